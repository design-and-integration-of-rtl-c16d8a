// tb_switch_nack: self-checking test of the virtual-channel switch.
// A 2-phase link sender offers random flits on both channels and resends a
// flit that was refused (ln). Eight slow 4-phase receivers model the merges
// of the two channels. Checked: every accepted flit leaves on the channel
// named by its top bit and the direction named by the next two bits, once,
// in order per channel, with the address field rotated; refusals happen
// while a channel is occupied; both channels hold flits at the same time,
// so one channel passes while the other waits.
module tb_switch_nack;
  localparam int W = 20, AW = 8, NFLIT = 400;
  localparam int AH = W - 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la, ln;
  logic [W-1:0] din;
  logic [1:0][3:0] rr, ra, busy;
  logic [1:0][W-1:0] dout;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q[2][$], rcv_q[2][$];
  int n_rcv = 0, n_nack = 0, n_both = 0;

  always #5 clk = ~clk;

  switch_nack #(.FLIT_W(W), .ADDR_W(AW)) dut (.clk, .rst_n, .lr, .la, .ln, .din, .rr, .ra, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rotated(input logic [W-1:0] f);
    logic [AW-1:0] a;
    a = f[AH -: AW];
    return {f[W-1], a[AW-3:0], a[AW-1 -: 2], f[AH-AW:0]};
  endfunction

  initial begin
    ra = '0; busy = '0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        if (rr[0] != '0 && rr[1] != '0) n_both++;
        for (int c = 0; c < 2; c++) begin
          check($countones(rr[c]) <= 1, "one request per channel");
          for (int k = 0; k < 4; k++) if (rr[c][k] && !ra[c][k] && !busy[c][k]) begin
            logic [W-1:0] e;
            busy[c][k] = 1'b1;
            e = dout[c];
            // the pair used for steering is now the lowest address pair
            check(k == int'(e[AH-AW+2 -: 2]), $sformatf("channel %0d flit to %0d, expected %0d", c, k, e[AH-AW+2 -: 2]));
            check(int'(e[W-1]) == c, "flit on the channel of its channel bit");
            rcv_q[c].push_back(e);
            n_rcv++;
            fork
              automatic int cc = c, kk = k;
              begin
                repeat ($urandom_range(0, 12)) @(negedge clk);
                ra[cc][kk] = 1'b1;
                while (rr[cc][kk]) @(negedge clk);
                repeat ($urandom_range(0, 2)) @(negedge clk);
                ra[cc][kk] = 1'b0;
                busy[cc][kk] = 1'b0;
              end
            join_none
          end
        end
      end
    end
  end

  initial begin
    logic la0, ln0;
    lr = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NFLIT; ) begin
      repeat ($urandom_range(0, 1)) @(posedge clk);
      #1 din = W'($urandom);
      forever begin
        la0 = la; ln0 = ln;
        lr = ~lr;
        while (la == la0 && ln == ln0) @(posedge clk);
        #1;
        if (la != la0) break;
        n_nack++;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
      exp_q[din[W-1]].push_back(din);
      t++;
    end
    while (n_rcv < NFLIT) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      check(rcv_q[c].size() == exp_q[c].size(), "flit count per channel");
      for (int i = 0; i < exp_q[c].size() && i < rcv_q[c].size(); i++)
        check(rcv_q[c][i] == rotated(exp_q[c][i]), $sformatf("channel %0d flit %0d content and order", c, i));
    end
    check(n_nack > 0, "refusals happened");
    check(n_both > 0, "both channels occupied at once");
    $display("refusals=%0d both-busy cycles=%0d", n_nack, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
