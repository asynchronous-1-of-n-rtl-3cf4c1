// tb_st_wire: self-checking test of the single-track wire with keeper.
//
// Drives random pull-up and pull-down patterns on a 4-rail wire, never
// both on one rail, with long idle stretches, and compares the rails
// every cycle with a reference: set one cycle after a pull-up, cleared one
// cycle after a pull-down, unchanged otherwise.
module tb_st_wire;
  localparam int N = 4;

  logic clk = 0;
  logic rst = 1'b0;   // the wire has no reset; this only enables its check
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] up, dn, rail, model;
  st_wire #(.N(N)) dut (.clk, .rst, .up, .dn, .rail);

  int holds = 0;
  initial begin
    up = '0; dn = '1;
    @(posedge clk); #1;
    dn = '0;
    model = '0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (rail !== model) begin
        failures++;
        $display("FAIL cycle %0d: rail %b expected %b", i, rail, model);
      end
      if (up == '0 && dn == '0) holds++;
      // next stimulus: idle half the time
      if ($urandom_range(1, 0) == 0) begin
        up = '0; dn = '0;
      end else begin
        up = N'($urandom);
        dn = N'($urandom) & ~up;
      end
      for (int k = 0; k < N; k++)
        if (up[k]) model[k] = 1'b1; else if (dn[k]) model[k] = 1'b0;
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
