// tb_fig5_island: self-checking testbench for fig5_island.
//
// Starts one iteration in every enabled cycle while the clock enable is
// toggled at random. Input b of each iteration is presented exactly 13
// enabled steps after its a, and the result is expected exactly 18
// enabled steps after a; both offsets are checked by comparing every
// result with a binary64 reference of the same four rounded operations.
module tb_fig5_island;
  import tb_f32_pkg::*;

  localparam int B_OFF = 13, LAT = 18, NIT = 1500;

  logic clk = 0, ce = 0;
  logic [31:0] a = 0, b = 0, x;
  logic [31:0] av [NIT + LAT + 1];
  logic [31:0] bv [NIT + LAT + 1];
  int checks = 0, failures = 0, n = 0, last_checked = -1;

  fig5_island dut (.clk, .ce, .a, .b, .x);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i <= NIT + LAT; i++) begin
      av[i] = rand_f32(118, 130);
      bv[i] = rand_f32(118, 130);
    end
    while (n <= NIT + LAT) begin
      @(negedge clk);
      // n enabled edges have happened so far
      if (n >= LAT && last_checked != n) begin
        checks++;
        last_checked = n;
        if (x !== island_ref(av[n-LAT], bv[n-LAT])) begin
          failures++;
          if (failures < 10) $display("MISMATCH it=%0d x=%h expected=%h", n-LAT, x, island_ref(av[n-LAT], bv[n-LAT]));
        end
      end
      a  = av[n];
      b  = (n >= B_OFF) ? bv[n-B_OFF] : 32'h0;
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
