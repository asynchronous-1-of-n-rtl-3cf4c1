// tb_stfb_tx: self-checking test of the four-phase to single-track
// transmitter.
//
// A four-phase sender puts a random bit on L when Le is high, removes it
// when Le falls and waits for Le to rise again, each step after a random
// delay. A single-track receiver with random stalls takes R. Every bit must
// arrive once and in order; the four-phase rules are checked by assertion.
module tb_stfb_tx;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t l, r_up, r_dn, r;
  logic le; int unsigned cnt, bad;
  st_wire u_wr (.clk, .rst, .up(r_up), .dn(r_dn), .rail(r));
  stfb_tx dut (.clk, .rst, .l, .le, .r, .r_up);
  tb_st_snk #(.MAXSTALL(5)) u_k (.clk, .rst, .rail(r), .dn(r_dn), .count(cnt), .bad(bad));

  int unsigned sent_q[$];
  int le_fall = 0;
  initial begin
    l = 2'b00;
    wait (!rst);
    for (int i = 0; i < NTOK; i++) begin
      automatic logic v = 1'($urandom_range(1, 0));
      while (!le) @(posedge clk);
      repeat ($urandom_range(3, 0)) @(posedge clk);
      l <= dr_enc(v);
      sent_q.push_back(32'(v));
      @(posedge clk);
      while (le) @(posedge clk);
      le_fall++;
      repeat ($urandom_range(3, 0)) @(posedge clk);
      l <= 2'b00;
      @(posedge clk);
    end
  end

  // a new bit must not be sent twice: R rises once per four-phase cycle
  int r_rise = 0;
  dr_t r_q;
  always @(posedge clk) begin
    r_q <= r;
    if (!rst && r_q == 2'b00 && r != 2'b00) r_rise++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait (cnt == NTOK || cyc > 60000);
    repeat (20) @(posedge clk);
    check(cnt == NTOK, $sformatf("received %0d", cnt));
    check(r_rise == NTOK, $sformatf("single-track sends %0d", r_rise));
    check(le_fall == NTOK, "one enable cycle per bit");
    check(bad == 0, "one-hot output");
    check(le == 1'b1, "enable high when idle");
    for (int i = 0; i < NTOK && i < int'(cnt); i++)
      check(u_k.got_q[i] == sent_q[i], $sformatf("token %0d", i));
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
