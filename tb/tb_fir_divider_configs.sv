// The other configurations of the divider, each with its own random end-to-end test
// (div_config_run): single-precision significands (24 bits, two guard bits, two steps from
// the 8-bit seed), the basic method with one guard bit, three guard bits, and a 14-bit seed
// table with two Goldschmidt steps for double precision.
module tb_fir_divider_configs;
  logic clk = 0;
  logic d [4];
  int   c [4];
  int   f [4];

  always #5 clk = ~clk;

  div_config_run #(.N(24), .M(2), .ITER(2))                        u_single (.clk, .done(d[0]), .checks(c[0]), .failures(f[0]));
  div_config_run #(.N(53), .M(1), .ITER(3))                        u_basic  (.clk, .done(d[1]), .checks(c[1]), .failures(f[1]));
  div_config_run #(.N(53), .M(3), .ITER(3))                        u_m3     (.clk, .done(d[2]), .checks(c[2]), .failures(f[2]));
  div_config_run #(.N(53), .M(2), .ITER(2), .IDX(14), .FRAC(16))  u_seed14 (.clk, .done(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (500_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (10) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
