// tb_ora_diag: per-group ORA. Checks that a mismatch on pair k sets exactly
// the flip-flop of group k/GROUP, for GROUP = 1 and 2, and that the results
// shift out in chain order.
module tb_ora_diag;
  localparam int P = 4;
  logic clk = 1'b0, bist_rst = 1'b1, scan_mode = 1'b1;
  logic [P-1:0] a, b;
  logic [3:0] fail1;
  logic [1:0] fail2;
  logic so1, so2;
  int checks = 0, failures = 0;

  ora_diag #(.PAIRS(P), .GROUP(1)) d1 (.clk, .bist_rst, .scan_mode, .scan_in(1'b0),
                                      .a, .b, .fail(fail1), .scan_out(so1));
  ora_diag #(.PAIRS(P), .GROUP(2)) d2 (.clk, .bist_rst, .scan_mode, .scan_in(1'b0),
                                      .a, .b, .fail(fail2), .scan_out(so2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < P; k++) begin
      logic [3:0] e1;
      bist_rst = 1'b1; scan_mode = 1'b1; a = '0; b = '0;
      @(negedge clk); bist_rst = 1'b0;
      a = P'($urandom); b = a; b[k] ^= 1'b1;
      @(negedge clk);
      a = '0; b = '0;
      repeat (3) @(negedge clk);
      e1 = 4'(1 << k);
      check(fail1 == e1, $sformatf("pair %0d -> group-1 flops %b", k, fail1));
      check(fail2 == 2'(1 << (k / 2)), $sformatf("pair %0d -> group-2 flops %b", k, fail2));
      scan_mode = 1'b0;
      for (int s = 0; s < 4; s++) begin
        check(so1 == e1[3-s], $sformatf("pair %0d scan bit %0d", k, s));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
