// tb_vnt_island: self-checking testbench for vnt_island.
//
// Starts one iteration in every enabled cycle while the clock enable is
// toggled at random. The weight of each iteration is presented exactly
// 18 enabled steps after its d and the result is expected exactly 27
// enabled steps after d; every result is compared with a binary64
// reference of the same six rounded operations.
module tb_vnt_island;
  import tb_f32_pkg::*;

  localparam int W_OFF = 18, LAT = 27, NIT = 1500;

  logic clk = 0, ce = 0;
  logic [31:0] d = 0, w = 0, y;
  logic [31:0] dv [NIT + LAT + 1];
  logic [31:0] wv [NIT + LAT + 1];
  int checks = 0, failures = 0, n = 0, last_checked = -1;

  vnt_island dut (.clk, .ce, .d, .w, .y);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i <= NIT + LAT; i++) begin
      dv[i] = rand_f32(120, 127);
      wv[i] = rand_f32(120, 134);
    end
    while (n <= NIT + LAT) begin
      @(negedge clk);
      if (n >= LAT && last_checked != n) begin
        checks++;
        last_checked = n;
        if (y !== vnt_ref(dv[n-LAT], wv[n-LAT])) begin
          failures++;
          if (failures < 10) $display("MISMATCH it=%0d y=%h expected=%h", n-LAT, y, vnt_ref(dv[n-LAT], wv[n-LAT]));
        end
      end
      d  = dv[n];
      w  = (n >= W_OFF) ? wv[n-W_OFF] : 32'h0;
      ce = ($urandom % 3) != 0;
      @(posedge clk);
      if (ce) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
