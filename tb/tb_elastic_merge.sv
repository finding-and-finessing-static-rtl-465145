// tb_elastic_merge: self-checking testbench for elastic_merge.
//
// Three numbered input streams with random valid gaps and a randomly
// ready output. In every cycle the output must carry the token of the
// lowest-numbered valid input, only that input may be consumed, and
// every stream must arrive complete and in order.
module tb_elastic_merge;
  localparam int N = 3, NCYC = 6000;

  logic [N-1:0]        in_valid = '0, in_ready;
  logic [N-1:0][15:0]  in_data = '0;
  logic                out_valid, out_ready = 0;
  logic [15:0]         out_data;
  int cnt [N];
  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0;

  elastic_merge #(.W(16), .N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    int win;
    for (int i = 0; i < N; i++) cnt[i] = 0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom % 3 == 0);
        in_data[i]  = 16'(i * 16'h4000 + cnt[i]);
      end
      out_ready = ($urandom % 4 != 0);
      #1;
      win = -1;
      for (int i = N - 1; i >= 0; i--) if (in_valid[i]) win = i;
      check(out_valid == (win >= 0), "out_valid");
      if (win >= 0) check(out_data == 16'(win * 16'h4000 + cnt[win]), "out_data from the winning input");
      for (int i = 0; i < N; i++)
        check(in_ready[i] == (i == win && out_ready), $sformatf("in_ready[%0d]", i));
      if (win >= 0 && out_ready) cnt[win]++;
    end
    check(cnt[0] > 0 && cnt[1] > 0 && cnt[2] > 0, "every input served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
