// tb_swapper: random permutations and random inputs; every output must equal
// the input its select names.
module tb_swapper;
  localparam int N = 4;
  logic [N-1:0] in, out;
  logic [N-1:0][1:0] sel;
  int checks = 0, failures = 0;

  swapper #(.N(N)) dut (.in, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    for (int t = 0; t < 200; t++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (perm[i]) sel[i] = 2'(perm[i]);
      in = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out[i] !== in[perm[i]]) begin
          failures++; $display("FAIL out[%0d]", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
