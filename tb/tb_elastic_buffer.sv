// tb_elastic_buffer: self-checking testbench for elastic_buffer.
//
// Runs the same random traffic through a transparent and an opaque
// buffer of depth 3. For both it checks that tokens leave in the order
// they entered with their data intact, that no more than DEPTH tokens
// are held while the output is blocked, and that in_ready does not
// depend on out_ready. The transparent buffer must offer an arriving
// token in the same cycle when empty; the opaque one must never do so.
module tb_elastic_buffer;
  localparam int DEPTH = 3, NTOK = 3000;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic [1:0] done = '0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_mode
    localparam bit TR = (g == 0);
    logic in_valid = 0, in_ready, out_valid, out_ready = 0;
    logic [15:0] in_data = 0, out_data;
    int nin = 0, nout = 0, cyc = 0, bypasses = 0;

    elastic_buffer #(.W(16), .DEPTH(DEPTH), .TRANSPARENT(TR)) dut (
      .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data
    );

    initial begin
      logic r0, r1;
      repeat (2) @(negedge clk);
      rst = 0;
      while (nout < NTOK && cyc < 20 * NTOK) begin
        @(negedge clk);
        cyc++;
        in_valid  = (nin < NTOK) && ($urandom % 3 != 0);
        in_data   = 16'(nin * 7 + 3);
        out_ready = (cyc % 200 < 20) ? 1'b0 : ($urandom % 3 != 0);
        #1;
        r0 = in_ready; out_ready = !out_ready; #1; r1 = in_ready; out_ready = !out_ready; #1;
        check(r0 == r1, "in_ready independent of out_ready");
        check(nin - nout <= DEPTH, "occupancy at most DEPTH");
        if (nin == nout) check(out_valid == (TR && in_valid), "empty buffer: pass-through only when transparent");
        if (out_valid && out_ready) begin
          check(out_data == 16'(nout * 7 + 3), $sformatf("mode %0d token %0d data", g, nout));
          if (nin == nout) bypasses++;
          nout++;
        end
        if (in_valid && in_ready) nin++;
      end
      check(nout == NTOK, "all tokens delivered");
      check(TR ? (bypasses > 0) : (bypasses == 0), "bypass used only when transparent");
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25 * NTOK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
