// tb_conv_4to2: self-checking test of the 4-to-2-phase output converter.
// A 4-phase sender offers numbered flits on lr/din; a 2-phase receiver takes
// each rr transition after a random delay and answers with a ra transition.
// Checked: flits arrive once and in order, dout does not change while a
// transition is unanswered, no second rr transition before ra answered the
// first, and on an idle converter rr toggles two cycles after lr rises and
// la rises one cycle later.
module tb_conv_4to2;
  localparam int W = 16, NFLIT = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la, rr, ra;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  int rcv_q[$];

  always #5 clk = ~clk;

  conv_4to2 #(.W(W)) dut (.clk, .rst_n, .lr, .la, .rr, .ra, .din, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 2-phase receiver
  initial begin
    logic rr_seen;
    logic [W-1:0] held;
    ra = 1'b0; rr_seen = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && rr != rr_seen) begin
        rr_seen = rr;
        held = dout;
        repeat ($urandom_range(0, 6)) begin
          @(negedge clk);
          check(dout == held, "dout stable until ra");
          check(rr == rr_seen, "no new rr before ra");
        end
        rcv_q.push_back(int'(dout));
        ra = ~ra;
      end
    end
  end

  initial begin
    lr = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 din = W'(0); lr = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(rr == 1'b1, "rr toggles two cycles after lr+");
    check(!la, "la not yet");
    @(posedge clk);
    #1 check(la, "la one cycle after rr");
    lr = 1'b0;
    while (la) @(posedge clk);
    for (int id = 1; id < NFLIT; id++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 din = W'(id); lr = 1'b1;
      while (!la) @(posedge clk);
      #1 lr = 1'b0;
      while (la) @(posedge clk);
    end
    while (rcv_q.size() < NFLIT) @(posedge clk);
    for (int i = 0; i < NFLIT; i++) check(rcv_q[i] == i, $sformatf("flit %0d arrived as %0d", i, rcv_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
