// tb_conv_2to4: self-checking test of the 2-to-4-phase converter.
// A link sender toggles lr; a model of the controller behind the converter
// answers each 4-phase request with la_m or ln_m at random after a random
// delay. Checked: lr_m rises one cycle after a toggle, each answer comes back
// as exactly one toggle of the matching 2-phase signal, lr_m falls after the
// answer, and no request is raised before the previous answer returned to
// zero.
module tb_conv_2to4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la, ln, lr_m, la_m, ln_m;
  int checks = 0, failures = 0;
  int n_ack = 0, n_nack = 0;

  always #5 clk = ~clk;

  conv_2to4 dut (.clk, .rst_n, .lr, .la, .ln, .lr_m, .la_m, .ln_m);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller model: answer lr_m+ with la_m or ln_m, drop after lr_m-
  initial begin
    la_m = 1'b0; ln_m = 1'b0;
    forever begin
      @(posedge clk);
      if (lr_m && !la_m && !ln_m) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
        if ($urandom_range(0, 2) == 0) ln_m = 1'b1; else la_m = 1'b1;
        do @(posedge clk); while (lr_m);
        @(posedge clk);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1 la_m = 1'b0; ln_m = 1'b0;
      end
    end
  end

  initial begin
    lr = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic la0, ln0;
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #1 la0 = la; ln0 = ln;
      check(!lr_m, "lr_m low before a new link request");
      lr = ~lr;
      @(posedge clk); #1;
      check(lr_m, "lr_m one cycle after lr toggles");
      // wait for the answer
      while (la == la0 && ln == ln0) @(posedge clk);
      #1;
      check((la != la0) ^ (ln != ln0), "exactly one answer");
      check((la != la0) == la_m && (ln != ln0) == ln_m, "link answer matches the internal answer");
      if (la != la0) n_ack++; else n_nack++;
      @(posedge clk); #1;
      check(!lr_m, "lr_m falls after the answer");
      // wait until the internal handshake is back to zero
      while (la_m || ln_m) @(posedge clk);
      @(posedge clk);
    end
    check(n_ack + n_nack == 300, "all requests answered");
    check(n_ack > 0 && n_nack > 0, "both acknowledge and nack seen");
    $display("acks=%0d nacks=%0d", n_ack, n_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
