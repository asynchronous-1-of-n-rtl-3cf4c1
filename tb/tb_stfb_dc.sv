// tb_stfb_dc: self-checking test of the data consumer.
//
// A random sender pushes bits into the consumer, sometimes back to back.
// For every bit the test checks that only one rail was high, that the
// channel was blank again exactly 3 cycles after the rail rose, and that
// exactly one consume pulse was seen while it was high. At the end every
// bit must have been removed (the sender finishes), the rails seen must
// match the values sent, and the consumer must have held its pull-downs
// on during reset.
module tb_stfb_dc;
  import st_pkg::*;

  localparam int NTOK = 300;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dr_t l_up, l_dn, l;
  logic dl, consumed;
  st_wire u_wl (.clk, .rst, .up(l_up), .dn(l_dn), .rail(l));
  tb_st_src #(.NTOK(NTOK), .MAXGAP(5)) u_src (.clk, .rst, .hold(1'b0), .rail(l), .up(l_up), .done(dl));
  stfb_dc dut (.clk, .rst, .l, .l_dn, .consumed);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one record per high period of the channel
  int ncons = 0, hi = 0, rises = 0, pcons = 0, rst_dn = 0;
  dr_t seen;
  int unsigned seen_q[$];
  always @(posedge clk) begin
    if (rst) begin
      hi <= 0; pcons <= 0; seen <= '0;
      if (cyc > 2 && l_dn == 2'b11) rst_dn++;
    end else if (l != 2'b00) begin
      hi    <= hi + 1;
      seen  <= seen | l;
      pcons <= pcons + (consumed ? 1 : 0);
      if (consumed) ncons++;
    end else begin
      if (consumed) ncons++;
      if (hi != 0) begin
        rises++;
        check(hi == 3, $sformatf("bit %0d high for %0d cycles", rises, hi));
        check(pcons == 1, $sformatf("bit %0d: %0d consume pulses", rises, pcons));
        check(seen == 2'b01 || seen == 2'b10, $sformatf("bit %0d: rails %b", rises, seen));
        seen_q.push_back(seen == 2'b10 ? 1 : 0);
      end
      hi <= 0; pcons <= 0; seen <= '0;
    end
  end

  initial begin
    repeat (6) @(posedge clk);
    rst = 0;
    wait (dl || cyc > 60000);
    repeat (10) @(posedge clk);
    check(dl, "all bits consumed");
    check(u_src.sent_q.size() == NTOK, "sender finished");
    check(ncons == NTOK, $sformatf("consume pulses %0d", ncons));
    check(rises == NTOK, $sformatf("rail high periods %0d", rises));
    check(rst_dn > 0, "pull-downs on during reset");
    for (int i = 0; i < NTOK && i < seen_q.size(); i++)
      check(seen_q[i] == u_src.sent_q[i], $sformatf("bit %0d value", i));
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
