// tb_elastic_branch: self-checking testbench for elastic_branch.
//
// A numbered data stream and a random condition stream, both with random
// valid gaps, and two randomly ready successors. Each data token must
// reach the successor its condition names, in order, consumed together
// with its condition, and never appear on the other side.
module tb_elastic_branch;
  localparam int NTOK = 3000;

  logic clk = 0;
  logic in_valid = 0, in_ready, cond_valid = 0, cond_ready, cond_data = 0;
  logic out_t_valid, out_t_ready = 0, out_f_valid, out_f_ready = 0;
  logic [15:0] in_data = 0, out_t_data, out_f_data;
  logic conds [NTOK];
  int checks = 0, failures = 0, n = 0, nt = 0, nf = 0, cyc = 0;

  elastic_branch #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    for (int i = 0; i < NTOK; i++) conds[i] = 1'($urandom);
    while (n < NTOK && cyc < 20 * NTOK) begin
      @(negedge clk);
      cyc++;
      in_valid    = ($urandom % 3 != 0); in_data = 16'(n * 5 + 1);
      cond_valid  = ($urandom % 3 != 0); cond_data = conds[n];
      out_t_ready = ($urandom % 3 != 0);
      out_f_ready = ($urandom % 3 != 0);
      #1;
      check(out_t_valid == (in_valid && cond_valid && conds[n]), "out_t_valid");
      check(out_f_valid == (in_valid && cond_valid && !conds[n]), "out_f_valid");
      check((in_valid && in_ready) == (cond_valid && cond_ready), "data and condition consumed together");
      if (out_t_valid && out_t_ready) begin
        check(out_t_data == 16'(n * 5 + 1), "true-side data"); nt++;
      end
      if (out_f_valid && out_f_ready) begin
        check(out_f_data == 16'(n * 5 + 1), "false-side data"); nf++;
      end
      if (in_valid && in_ready) begin
        check((conds[n] ? out_t_ready : out_f_ready), "consumed only when the chosen side accepts");
        n++;
      end
    end
    check(n == NTOK && nt + nf == NTOK && nt > 0 && nf > 0, "all tokens steered");
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
