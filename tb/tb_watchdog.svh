// Watchdog shared by the testbenches: the design has no clock, so a free
// running testbench clock bounds the run; after MAX_CYCLES it counts a
// failure and ends the simulation. Needs `checks` and `failures` declared.
logic wd_clk = 1'b0;
int   wd_cycles = 0;
always #5 wd_clk = ~wd_clk;
always @(posedge wd_clk) begin
  wd_cycles <= wd_cycles + 1;
  if (wd_cycles > 1_000_000) begin
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
end

task automatic check(input logic cond, input string what);
  checks++;
  if (!cond) begin
    failures++;
    if (failures < 20) $display("FAIL: %s", what);
  end
endtask
