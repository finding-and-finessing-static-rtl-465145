// tb_fp_div: self-checking testbench for fp_div.
//
// Drives random and corner-case operand pairs while toggling the clock
// enable at random, keeps its own model of which result should leave the
// pipeline after exactly LATENCY enabled cycles, and compares every
// result bit-for-bit with a binary64 quotient rounded to binary32 (exact,
// since binary64 carries more than twice the bits of binary32). Corner
// cases: quotients near 1, equal exponents, division by zero, and
// results that overflow or underflow.
module tb_fp_div;
  import tb_f32_pkg::*;

  localparam int unsigned LAT = 10;
  localparam int NVEC = 3000;

  logic clk = 0, en = 0;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fp_div #(.LATENCY(LAT)) dut (.clk, .en, .a, .b, .y);

  always #5 clk = ~clk;

  logic [31:0] exp_pipe [LAT];
  logic        vld_pipe [LAT];

  function automatic logic [31:0] ref_div(input logic [31:0] x, input logic [31:0] z);
    return r2f(f2r(x) / f2r(z));
  endfunction

  task automatic pick(input int n);
    case (n % 6)
      0: begin a = rand_f32(100, 154); b = rand_f32(100, 154); end
      1: begin a = rand_f32(120, 130); b = {~a[31], a[30:0]} ^ 32'(($urandom % 4)); end
      2: begin a = rand_f32(120, 130); b = rand_f32(120, 130); b[30:23] = a[30:23]; end
      3: begin a = rand_f32(110, 140); b = 32'(n[0]) << 31; end
      4: begin a = rand_f32(140, 150); b = rand_f32(100, 112); end
      default: begin a = rand_f32(125, 128); b = rand_f32(125, 128); end
    endcase
  endtask

  initial begin
    for (int i = 0; i < LAT; i++) vld_pipe[i] = 0;
    for (int n = 0; n < NVEC; ) begin
      @(negedge clk);
      // check what the last edge produced
      if (vld_pipe[LAT-1]) begin
        checks++;
        if (y !== exp_pipe[LAT-1]) begin
          failures++;
          if (failures < 10) $display("MISMATCH y=%h expected=%h", y, exp_pipe[LAT-1]);
        end
        vld_pipe[LAT-1] = 0;
      end
      en = ($urandom % 4) != 0;
      if (en) begin
        pick(n);
        n++;
        for (int i = LAT-1; i > 0; i--) begin exp_pipe[i] = exp_pipe[i-1]; vld_pipe[i] = vld_pipe[i-1]; end
        exp_pipe[0] = ref_div(a, b);
        vld_pipe[0] = 1;
      end
    end
    // drain
    for (int k = 0; k < LAT; k++) begin
      @(negedge clk);
      if (vld_pipe[LAT-1]) begin
        checks++;
        if (y !== exp_pipe[LAT-1]) failures++;
      end
      en = 1;
      for (int i = LAT-1; i > 0; i--) begin exp_pipe[i] = exp_pipe[i-1]; vld_pipe[i] = vld_pipe[i-1]; end
      vld_pipe[0] = 0;
    end
    @(negedge clk);
    if (vld_pipe[LAT-1]) begin checks++; if (y !== exp_pipe[LAT-1]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NVEC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
