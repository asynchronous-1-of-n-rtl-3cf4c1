// tb_stfb_and: self-checking test of the dual-rail single-track AND gate.
//
// Two random senders with independent random gaps drive a and b; a
// receiver with random stalls takes c. Every result must equal the
// reference a & b of the operand pair with the same index.
// The output must never appear before both operands are present.
module tb_stfb_and;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t a_up, a_dn, a, b_up, b_dn, b, c_up, c_dn, c;
  logic da, db; int unsigned cnt, bad;
  st_wire u_wa (.clk, .rst, .up(a_up), .dn(a_dn), .rail(a));
  st_wire u_wb (.clk, .rst, .up(b_up), .dn(b_dn), .rail(b));
  st_wire u_wc (.clk, .rst, .up(c_up), .dn(c_dn), .rail(c));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(8)) u_sa (.clk, .rst, .hold(1'b0), .rail(a), .up(a_up), .done(da));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(8)) u_sb (.clk, .rst, .hold(1'b0), .rail(b), .up(b_up), .done(db));
  stfb_and dut (.clk, .rst, .a, .a_dn, .b, .b_dn, .c, .c_up);
  tb_st_snk #(.MAXSTALL(4)) u_sc (.clk, .rst, .rail(c), .dn(c_dn), .count(cnt), .bad(bad));

  // classify each output event by whether both operands were present
  int early = 0, premature = 0, both_n = 0;
  dr_t c_q;
  always @(posedge clk) begin
    c_q <= c;
    if (!rst && c_q == 2'b00 && c != 2'b00) begin
      if (dr_full(a) && dr_full(b)) both_n++;
      if (!(dr_full(a) && dr_full(b))) begin
        premature++;
      end
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
    check(a == 2'b00 && b == 2'b00, "inputs consumed at the end");
    for (int i = 0; i < NTOK && i < int'(cnt); i++) begin
      automatic logic av = 1'(u_sa.sent_q[i]);
      automatic logic bv = 1'(u_sb.sent_q[i]);
      check(u_sc.got_q[i] == int'(av & bv), $sformatf("result %0d: %0d op %0d -> %0d", i, av, bv, u_sc.got_q[i]));
    end
    check(premature == 0, $sformatf("output before both operands: %0d", premature));
    check(both_n > 0, "outputs formed");
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
