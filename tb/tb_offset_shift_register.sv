// tb_offset_shift_register: self-checking testbench for offset_shift_register.
//
// Random start and enable patterns; after every edge the whole register
// is compared with a model in which the start bit of enabled step s must
// be found at bit k exactly k enabled steps later.
module tb_offset_shift_register;
  localparam int D = 18, NCYC = 4000;

  logic clk = 0, rst = 1, en = 0, start = 0;
  logic [D:1] tok;
  logic hist [$];            // start bit of each enabled step, newest last
  int checks = 0, failures = 0;

  offset_shift_register #(.DEPTH(D)) dut (.clk, .rst, .en, .start, .tok);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int c = 0; c < NCYC; c++) begin
      en = ($urandom % 4) != 0;
      start = 1'($urandom % 2);
      @(negedge clk);
      if (en) hist.push_back(start);
      for (int k = 1; k <= D; k++) begin
        logic want;
        want = (hist.size() >= k) ? hist[hist.size() - k] : 1'b0;
        checks++;
        if (tok[k] !== want) begin
          failures++;
          if (failures < 10) $display("MISMATCH cycle %0d bit %0d", c, k);
        end
      end
      if (c == NCYC / 2) begin
        rst = 1; @(negedge clk); rst = 0; hist.delete();
        checks++;
        if (tok !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
