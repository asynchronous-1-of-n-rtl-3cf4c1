// tb_stfb_xor3: self-checking test of the three-input dual-rail single-track
// XOR gate.
//
// Three random senders drive a, b and d with independent gaps (d is the
// slowest), and a receiver with random stalls takes c. Every result must
// equal a ^ b ^ d for the operands with the same index.
// The test also counts premature outputs (c sent while an input is still
// missing), which an XOR must never produce.
module tb_stfb_xor3;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t a_up, a_dn, a, b_up, b_dn, b, d_up, d_dn, d, c_up, c_dn, c;
  logic da, db, dd;
  int unsigned cnt, bad;
  st_wire u_wa (.clk, .rst, .up(a_up), .dn(a_dn), .rail(a));
  st_wire u_wb (.clk, .rst, .up(b_up), .dn(b_dn), .rail(b));
  st_wire u_wd (.clk, .rst, .up(d_up), .dn(d_dn), .rail(d));
  st_wire u_wc (.clk, .rst, .up(c_up), .dn(c_dn), .rail(c));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sa (.clk, .rst, .hold(1'b0), .rail(a), .up(a_up), .done(da));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sb (.clk, .rst, .hold(1'b0), .rail(b), .up(b_up), .done(db));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(12)) u_sd (.clk, .rst, .hold(1'b0), .rail(d), .up(d_up), .done(dd));
  stfb_xor3 dut (.clk, .rst, .a, .a_dn, .b, .b_dn, .d, .d_dn, .c, .c_up);
  tb_st_snk #(.MAXSTALL(4)) u_k (.clk, .rst, .rail(c), .dn(c_dn), .count(cnt), .bad(bad));

  int early = 0, wrong_early = 0;
  dr_t c_q;
  always @(posedge clk) begin
    c_q <= c;
    if (!rst && c_q == 2'b00 && c != 2'b00 && !(dr_full(a) && dr_full(b) && dr_full(d))) begin
      early++;
      if (!(a == b && dr_full(a) && c == a)) wrong_early++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait (cnt == NTOK || cyc > 60000);
    repeat (10) @(posedge clk);
    check(cnt == NTOK, $sformatf("result count %0d", cnt));
    check(bad == 0, "one-hot output");
    for (int i = 0; i < NTOK; i++) begin
      automatic int unsigned va = u_sa.sent_q[i], vb = u_sb.sent_q[i], vd = u_sd.sent_q[i];
      check(u_k.got_q[i] == (va ^ vb ^ vd), $sformatf("result %0d", i));
    end
    check(early == 0, $sformatf("premature outputs: %0d", early));
    check(a == 2'b00 && b == 2'b00 && d == 2'b00, "inputs consumed at the end");
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
