// tb_vnt_island_shared: self-checking testbench for vnt_island_shared.
//
// Starts one iteration in every start slot (every 9 enabled cycles) while
// the clock enable is toggled at random. Each iteration's weight is
// presented exactly 21 enabled cycles after its d, and its result is
// expected exactly 30 enabled cycles after d; every result is compared
// with a binary64 reference of the same rounded operations. Between the
// cycles where the island reads them, d and weight carry unrelated random
// values, so an operand read in the wrong cycle shows as a mismatch.
module tb_vnt_island_shared;
  import tb_f32_pkg::*;

  localparam int II = 9, W_OFF = 21, LAT = 30, NIT = 400;

  logic clk = 0, rst = 1, ce = 0;
  logic [31:0] d = 0, w = 0, y;
  logic [31:0] dv [NIT + 4];
  logic [31:0] wv [NIT + 4];
  int checks = 0, failures = 0, n = 0;

  vnt_island_shared dut (.clk, .rst, .ce, .d, .w, .y);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NIT + 4; i++) begin
      dv[i] = rand_f32(120, 127);
      wv[i] = rand_f32(120, 134);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    // n counts enabled cycles since reset; iteration k starts at n = 9k.
    while (n < II * NIT + LAT) begin
      @(negedge clk);
      if (n >= LAT && (n - LAT) % II == 0) begin
        checks++;
        if (y !== vnt_ref(dv[(n-LAT)/II], wv[(n-LAT)/II])) begin
          failures++;
          if (failures < 10) $display("MISMATCH it=%0d y=%h expected=%h", (n-LAT)/II, y,
                                      vnt_ref(dv[(n-LAT)/II], wv[(n-LAT)/II]));
        end
      end
      d  = (n % II == 0) ? dv[n/II] : rand_f32(120, 127);
      w  = (n >= W_OFF && (n - W_OFF) % II == 0) ? wv[(n-W_OFF)/II] : rand_f32(120, 134);
      ce = ($urandom % 3) != 0;
      @(posedge clk);
      if (ce) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * II * NIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
