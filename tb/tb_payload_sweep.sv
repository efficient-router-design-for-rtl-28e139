// tb_payload_sweep: runs the three routers with 8-, 16- and 32-bit packets,
// the payload sizes of the throughput comparison. Each width gets its own
// copy of the design (tb_sweep_lane); the test checks every packet arrives in
// order and that the CDMA router sustains five packets per cycle during the
// permutation phase, i.e. 5 x DW bits per clock.
module tb_payload_sweep;
  logic clk = 0, rst = 1;
  logic d8, d16, d32;
  int c8, c16, c32, f8, f16, f32, r8, r16, r32;
  int checks = 0, failures = 0;

  tb_sweep_lane #(.DW(8))  l8  (.clk, .rst, .done(d8),  .checks(c8),  .failures(f8),  .full_rate_cycles(r8));
  tb_sweep_lane #(.DW(16)) l16 (.clk, .rst, .done(d16), .checks(c16), .failures(f16), .full_rate_cycles(r16));
  tb_sweep_lane #(.DW(32)) l32 (.clk, .rst, .done(d32), .checks(c32), .failures(f32), .full_rate_cycles(r32));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    wait (d8 && d16 && d32);
    checks = c8 + c16 + c32 + 3;
    failures = f8 + f16 + f32;
    if (r8 < 299)  failures++;
    if (r16 < 299) failures++;
    if (r32 < 299) failures++;
    $display("CDMA full-rate cycles: DW=8 %0d, DW=16 %0d, DW=32 %0d", r8, r16, r32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
