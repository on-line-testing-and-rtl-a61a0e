// tb_ora_scan_cell: a chain of three ORA/scan cells. Checks that matching
// inputs pass, that a single-cycle mismatch on any pair is latched and held,
// that Start/Reset clears it, and that with scan mode low the results shift
// out one per clock in chain order.
module tb_ora_scan_cell;
  localparam int P = 4, NC = 3;
  logic clk = 1'b0, bist_rst = 1'b1, scan_mode = 1'b1;
  logic [P-1:0] a [NC], b [NC];
  logic [NC:0] chain;
  int checks = 0, failures = 0;

  assign chain[0] = 1'b0;
  for (genvar i = 0; i < NC; i++) begin : g
    ora_scan_cell #(.PAIRS(P)) dut (.clk, .bist_rst, .scan_mode, .scan_in(chain[i]),
                                    .a(a[i]), .b(b[i]), .pass_fail(chain[i+1]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NC-1:0] expect_fail;
    for (int trial = 0; trial < 40; trial++) begin
      bist_rst = 1'b1; scan_mode = 1'b1;
      foreach (a[i]) begin a[i] = '0; b[i] = '0; end
      @(negedge clk); bist_rst = 1'b0;
      check(chain[NC:1] == '0, "reset clears");
      expect_fail = NC'($urandom);
      for (int t = 0; t < 20; t++) begin
        foreach (a[i]) begin
          int bit_k;
          bit_k = int'($urandom % P);
          a[i] = P'($urandom); b[i] = a[i];
          // one single-cycle mismatch on a random pair, at cycle 7
          if (t == 7 && expect_fail[i]) b[i][bit_k] = ~b[i][bit_k];
        end
        @(negedge clk);
      end
      for (int i = 0; i < NC; i++)
        check(chain[i+1] == expect_fail[i], $sformatf("trial %0d cell %0d latched result", trial, i));
      // shift out: last cell first
      scan_mode = 1'b0;
      for (int s = 0; s < NC; s++) begin
        check(chain[NC] == expect_fail[NC-1-s], $sformatf("trial %0d scan bit %0d", trial, s));
        @(negedge clk);
      end
      check(chain[NC:1] == '0, "chain filled from scan_in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
