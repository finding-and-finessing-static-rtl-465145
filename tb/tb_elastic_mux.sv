// tb_elastic_mux: self-checking testbench for elastic_mux.
//
// A random sequence of select tokens and two numbered data streams, each
// with random valid gaps, and a randomly ready output. Every output token
// must be the next token of the stream its select token names, and the
// other stream must not lose a token.
module tb_elastic_mux;
  localparam int NTOK = 3000;

  logic clk = 0;
  logic sel_valid = 0, sel_ready, sel_data = 0;
  logic in0_valid = 0, in0_ready, in1_valid = 0, in1_ready, out_valid, out_ready = 0;
  logic [15:0] in0_data = 0, in1_data = 0, out_data;
  logic sels [NTOK];
  int checks = 0, failures = 0, ns = 0, n0 = 0, n1 = 0, cyc = 0;

  elastic_mux #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    for (int i = 0; i < NTOK; i++) sels[i] = 1'($urandom);
    while (ns < NTOK && cyc < 20 * NTOK) begin
      @(negedge clk);
      cyc++;
      sel_valid = ($urandom % 4 != 0);
      sel_data  = sels[ns];
      in0_valid = ($urandom % 3 != 0); in0_data = 16'h1000 + 16'(n0);
      in1_valid = ($urandom % 3 != 0); in1_data = 16'h8000 + 16'(n1);
      out_ready = ($urandom % 4 != 0);
      #1;
      check(out_valid == (sel_valid && (sel_data ? in1_valid : in0_valid)), "out_valid");
      check(!(in0_ready && in0_valid) || (out_valid && out_ready && !sel_data), "in0 consumed only when chosen and sent");
      check(!(in1_ready && in1_valid) || (out_valid && out_ready && sel_data), "in1 consumed only when chosen and sent");
      if (out_valid && out_ready) begin
        check(sel_ready, "select consumed with the data");
        check(out_data == (sels[ns] ? 16'h8000 + 16'(n1) : 16'h1000 + 16'(n0)), "out_data");
        if (sels[ns]) n1++; else n0++;
        ns++;
      end else check(!sel_ready || !sel_valid, "select kept while output not sent");
    end
    check(ns == NTOK, "all select tokens used");
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
