// tb_stfb_fa_fork: self-checking test of the fork-based full adder, and a
// latency comparison with the shared-acknowledge full adder stfb_fa.
//
// Part 1: three random senders (ci the slowest) drive stfb_fa_fork, and two
// receivers with random stalls take s and co. Each sum and carry must match
// a + b + ci for the operands with the same index, and early carries (co
// sent while ci has not yet reached the carry gate) must occur and only
// when a and b agree.
// Part 2: stfb_fa and stfb_fa_fork get the same hand-made stimulus, for all
// eight input values. a and b are raised together, and ci is raised 20
// cycles later. Both adders feed receivers that never stall. For each
// value, the test checks the arrival cycles:
//   a = b:  co arrives 2 cycles (stfb_fa) or 4 cycles (stfb_fa_fork) after
//           the a/b wires rise, without waiting for ci
//   a != b: co arrives 2 or 4 cycles after the ci wire rises
//   sum:    2 or 4 cycles after the ci wire rises
// so the fork adds two gate delays to both paths.
module tb_stfb_fa_fork;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- part 1: random traffic through the fork-based adder ----
  dr_t a_up, a_dn, a, b_up, b_dn, b, ci_up, ci_dn, ci;
  dr_t s_up, s_dn, s, co_up, co_dn, co;
  logic da, db, dci;
  int unsigned cnts, cntc, bads, badc;
  st_wire u_wa (.clk, .rst, .up(a_up), .dn(a_dn), .rail(a));
  st_wire u_wb (.clk, .rst, .up(b_up), .dn(b_dn), .rail(b));
  st_wire u_wci (.clk, .rst, .up(ci_up), .dn(ci_dn), .rail(ci));
  st_wire u_ws (.clk, .rst, .up(s_up), .dn(s_dn), .rail(s));
  st_wire u_wco (.clk, .rst, .up(co_up), .dn(co_dn), .rail(co));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sa (.clk, .rst, .hold(1'b0), .rail(a), .up(a_up), .done(da));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(4)) u_sb (.clk, .rst, .hold(1'b0), .rail(b), .up(b_up), .done(db));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(12)) u_sci (.clk, .rst, .hold(1'b0), .rail(ci), .up(ci_up), .done(dci));
  stfb_fa_fork dut (.clk, .rst, .a, .a_dn, .b, .b_dn, .ci, .ci_dn, .s, .s_up, .co, .co_up);
  tb_st_snk #(.MAXSTALL(4)) u_ks (.clk, .rst, .rail(s), .dn(s_dn), .count(cnts), .bad(bads));
  tb_st_snk #(.MAXSTALL(4)) u_kc (.clk, .rst, .rail(co), .dn(co_dn), .count(cntc), .bad(badc));

  int early = 0, wrong_early = 0;
  dr_t co_q;
  always @(posedge clk) begin
    co_q <= co;
    if (!rst && co_q == 2'b00 && co != 2'b00 && !dr_full(dut.mc)) begin
      early++;
      if (!(dut.ma == dut.mb && dr_full(dut.ma) && co == dut.ma)) wrong_early++;
    end
  end

  // ---- part 2: the same directed stimulus into both adders ----
  // index 0: stfb_fa, index 1: stfb_fa_fork
  dr_t m_a_up, m_b_up, m_ci_up;
  dr_t pa_dn[2], pa[2], pb_dn[2], pb[2], pci_dn[2], pci[2];
  dr_t ps_up[2], ps_dn[2], ps[2], pco_up[2], pco_dn[2], pco[2];
  int unsigned pcs[2], pcc[2], pbs[2], pbc[2];

  for (genvar k = 0; k < 2; k++) begin : g_p
    st_wire u_wa (.clk, .rst, .up(m_a_up), .dn(pa_dn[k]), .rail(pa[k]));
    st_wire u_wb (.clk, .rst, .up(m_b_up), .dn(pb_dn[k]), .rail(pb[k]));
    st_wire u_wci (.clk, .rst, .up(m_ci_up), .dn(pci_dn[k]), .rail(pci[k]));
    st_wire u_ws (.clk, .rst, .up(ps_up[k]), .dn(ps_dn[k]), .rail(ps[k]));
    st_wire u_wco (.clk, .rst, .up(pco_up[k]), .dn(pco_dn[k]), .rail(pco[k]));
    tb_st_snk #(.MAXSTALL(0)) u_ks (.clk, .rst, .rail(ps[k]), .dn(ps_dn[k]), .count(pcs[k]), .bad(pbs[k]));
    tb_st_snk #(.MAXSTALL(0)) u_kc (.clk, .rst, .rail(pco[k]), .dn(pco_dn[k]), .count(pcc[k]), .bad(pbc[k]));
  end

  stfb_fa u_pfa (.clk, .rst, .a(pa[0]), .a_dn(pa_dn[0]), .b(pb[0]), .b_dn(pb_dn[0]),
                 .ci(pci[0]), .ci_dn(pci_dn[0]), .s(ps[0]), .s_up(ps_up[0]),
                 .co(pco[0]), .co_up(pco_up[0]));
  stfb_fa_fork u_pff (.clk, .rst, .a(pa[1]), .a_dn(pa_dn[1]), .b(pb[1]), .b_dn(pb_dn[1]),
                      .ci(pci[1]), .ci_dn(pci_dn[1]), .s(ps[1]), .s_up(ps_up[1]),
                      .co(pco[1]), .co_up(pco_up[1]));

  // rise cycles of the a and ci wires, on the receivers' cycle count
  // (which restarts at reset) and sampled the way the receivers sample
  int unsigned t_ab, t_ci;
  dr_t pa_q, pci_q;
  always @(posedge clk) begin
    pa_q  <= pa[0];
    pci_q <= pci[0];
    if (pa_q == '0 && pa[0] != '0)   t_ab <= g_p[0].u_ks.cyc;
    if (pci_q == '0 && pci[0] != '0) t_ci <= g_p[0].u_ks.cyc;
  end

  initial begin
    int unsigned ts, tc;
    m_a_up = '0; m_b_up = '0; m_ci_up = '0;
    repeat (6) @(posedge clk);
    rst = 0;

    // part 2 runs first, while part 1 runs alongside on its own wires
    for (int v = 0; v < 8; v++) begin
      automatic bit va = v[0], vb = v[1], vc = v[2];
      automatic int unsigned sum = va + vb + vc;
      @(posedge clk);
      m_a_up <= dr_enc(va);
      m_b_up <= dr_enc(vb);
      @(posedge clk);
      m_a_up <= '0;
      m_b_up <= '0;
      repeat (19) @(posedge clk);
      m_ci_up <= dr_enc(vc);
      @(posedge clk);
      m_ci_up <= '0;
      repeat (30) @(posedge clk);
      for (int k = 0; k < 2; k++) begin
        automatic int unsigned lat = (k == 0) ? 2 : 4;
        check(pcs[k] == v + 1 && pcc[k] == v + 1,
              $sformatf("adder %0d value %0d: result counts %0d %0d", k, v, pcs[k], pcc[k]));
        if (k == 0) begin
          ts = g_p[0].u_ks.t_q[v]; tc = g_p[0].u_kc.t_q[v];
          check(g_p[0].u_ks.got_q[v] == sum % 2 && g_p[0].u_kc.got_q[v] == sum / 2,
                $sformatf("adder 0 value %0d: results", v));
        end else begin
          ts = g_p[1].u_ks.t_q[v]; tc = g_p[1].u_kc.t_q[v];
          check(g_p[1].u_ks.got_q[v] == sum % 2 && g_p[1].u_kc.got_q[v] == sum / 2,
                $sformatf("adder 1 value %0d: results", v));
        end
        check(ts == t_ci + lat, $sformatf("adder %0d value %0d: sum after %0d cycles", k, v, ts - t_ci));
        if (va == vb)
          check(tc == t_ab + lat, $sformatf("adder %0d value %0d: early carry after %0d cycles", k, v, tc - t_ab));
        else
          check(tc == t_ci + lat, $sformatf("adder %0d value %0d: carry after %0d cycles", k, v, tc - t_ci));
      end
      check(pa[0] == '0 && pb[0] == '0 && pci[0] == '0 && pa[1] == '0 && pb[1] == '0 && pci[1] == '0,
            $sformatf("value %0d: inputs consumed", v));
    end

    wait ((cnts == NTOK && cntc == NTOK) || cyc > 60000);
    repeat (10) @(posedge clk);
    check(cnts == NTOK && cntc == NTOK, $sformatf("result counts %0d %0d", cnts, cntc));
    check(bads == 0 && badc == 0 && pbs[0] == 0 && pbc[0] == 0 && pbs[1] == 0 && pbc[1] == 0,
          "one-hot outputs");
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
