// tb_stfb_fa: self-checking test of the dual-rail single-track full adder.
//
// Three random senders drive a, b and ci with independent gaps; two
// receivers with random stalls take s and co. Each sum and carry must
// match a + b + ci for the operands with the same index. The test also
// counts early carries (co sent while ci is still missing), which may
// only happen when a and b agree, and checks that they occur.
module tb_stfb_fa;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t a_up, a_dn, a, b_up, b_dn, b, ci_up, ci_dn, ci;
  dr_t s_up, s_dn, s, co_up, co_dn, co;
  logic da, db, dci; int unsigned cnts, cntc, bads, badc;
  st_wire u_wa (.clk, .rst, .up(a_up), .dn(a_dn), .rail(a));
  st_wire u_wb (.clk, .rst, .up(b_up), .dn(b_dn), .rail(b));
  st_wire u_wci (.clk, .rst, .up(ci_up), .dn(ci_dn), .rail(ci));
  st_wire u_ws (.clk, .rst, .up(s_up), .dn(s_dn), .rail(s));
  st_wire u_wco (.clk, .rst, .up(co_up), .dn(co_dn), .rail(co));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sa (.clk, .rst, .hold(1'b0), .rail(a), .up(a_up), .done(da));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sb (.clk, .rst, .hold(1'b0), .rail(b), .up(b_up), .done(db));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(12)) u_sci (.clk, .rst, .hold(1'b0), .rail(ci), .up(ci_up), .done(dci));
  stfb_fa dut (.clk, .rst, .a, .a_dn, .b, .b_dn, .ci, .ci_dn, .s, .s_up, .co, .co_up);
  tb_st_snk #(.MAXSTALL(4)) u_ks (.clk, .rst, .rail(s), .dn(s_dn), .count(cnts), .bad(bads));
  tb_st_snk #(.MAXSTALL(4)) u_kc (.clk, .rst, .rail(co), .dn(co_dn), .count(cntc), .bad(badc));

  int early = 0, wrong_early = 0;
  dr_t co_q;
  always @(posedge clk) begin
    co_q <= co;
    if (!rst && co_q == 2'b00 && co != 2'b00 && !dr_full(ci)) begin
      early++;
      if (!(a == b && dr_full(a) && co == a)) wrong_early++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait ((cnts == NTOK && cntc == NTOK) || cyc > 60000);
    repeat (10) @(posedge clk);
    check(cnts == NTOK && cntc == NTOK, $sformatf("result counts %0d %0d", cnts, cntc));
    check(bads == 0 && badc == 0, "one-hot outputs");
    for (int i = 0; i < NTOK; i++) begin
      automatic int unsigned sum = u_sa.sent_q[i] + u_sb.sent_q[i] + u_sci.sent_q[i];
      check(u_ks.got_q[i] == sum % 2, $sformatf("sum %0d", i));
      check(u_kc.got_q[i] == sum / 2, $sformatf("carry %0d", i));
    end
    check(early > 0, $sformatf("early carries: %0d", early));
    check(wrong_early == 0, "early carry only when a equals b");
    check(a == 2'b00 && b == 2'b00 && ci == 2'b00, "inputs consumed at the end");
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
