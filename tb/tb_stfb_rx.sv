// tb_stfb_rx: self-checking test of the single-track to four-phase
// receiver.
//
// A random single-track sender drives L. A four-phase receiver takes each
// bit from R, lowers Re after a random delay, waits for R to return to
// zero and raises Re again after a random delay. Every bit must arrive once
// and in order, and each fall of Re must give one pull-down pulse of
// exactly three cycles on L.
module tb_stfb_rx;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t l_up, l_dn, l, r;
  logic re, dl;
  st_wire u_wl (.clk, .rst, .up(l_up), .dn(l_dn), .rail(l));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_src (.clk, .rst, .hold(1'b0), .rail(l), .up(l_up), .done(dl));
  stfb_rx dut (.clk, .rst, .l, .l_dn, .r, .re);

  int unsigned got_q[$];
  initial begin
    re = 1'b1;
    wait (!rst);
    forever begin
      @(posedge clk);
      if (r != 2'b00) begin
        if ($countones(r) != 1) failures++;
        got_q.push_back(32'(dr_dec(r)));
        repeat ($urandom_range(3, 0)) @(posedge clk);
        re <= 1'b0;
        @(posedge clk);
        while (r != 2'b00) @(posedge clk);
        repeat ($urandom_range(3, 0)) @(posedge clk);
        re <= 1'b1;
        @(posedge clk);
      end
    end
  end

  // pulse width of the pull-down on L
  // (the pull-down forced on during reset is not counted)
  int plen = 0, pulses = 0, badlen = 0;
  logic seen_idle = 1'b0;
  always @(posedge clk) begin
    if (!rst && !l_dn[0]) seen_idle <= 1'b1;
    if (rst || !seen_idle) plen <= 0;
    else if (l_dn[0]) plen <= plen + 1;
    else if (plen != 0) begin
      pulses++;
      if (plen != 3) badlen++;
      plen <= 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait (got_q.size() == NTOK || cyc > 60000);
    repeat (20) @(posedge clk);
    check(got_q.size() == NTOK, $sformatf("received %0d", got_q.size()));
    for (int i = 0; i < NTOK && i < got_q.size(); i++)
      check(got_q[i] == u_src.sent_q[i], $sformatf("token %0d", i));
    check(pulses == NTOK && badlen == 0, $sformatf("pulses %0d, wrong length %0d", pulses, badlen));
    check(l == 2'b00 && r == 2'b00, "channel blank and output returned to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
