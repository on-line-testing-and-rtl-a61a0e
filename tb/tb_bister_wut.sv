// tb_bister_wut: runs the interconnect BISTER against the routing model.
// The B group arrives rotated and the swapper is set to undo the rotation.
// Fault-free routing must pass; every injected fault (stuck, open, shorts to
// the neighbouring bus of each kind, a short inside the group, a fault in the
// B group, a short among three wires) must fail; a wrong swapper setting
// must fail. Checks the phase
// length of 2^(2N) patterns and the scan path. Finally three wire sets X, Y,
// Z are compared pairwise, each set twice against different partners, with
// X and Y carrying the same short: the X-Y comparison cannot see it, and the
// two comparisons with Z must both fail.
// A second BISTER with K = 2 (two groups of two wires) repeats the fault
// phases; for it the testbench also checks that over one phase every pair of
// WUT wires, and every WUT wire against every neighbour wire, takes both
// opposite value pairs (0,1) and (1,0), and that the phase lasts 2^(2K+2)
// patterns.
module tb_bister_wut;
  localparam int N = 4, K = 2;
  logic tck = 1'b0, bist_rst = 1'b1, scan_mode = 1'b0, scan_in = 1'b0;
  logic [N-1:0][1:0] swap_sel;
  logic [N-1:0] wut_drv, adj_drv, wut_a_rx, wut_b_rx;
  logic pass_fail, done;
  logic [N-1:0] g_drv, g_adj, g_a_rx, g_b_rx;
  logic g_pass_fail, g_done;
  bit grouped = 1'b0;
  int rot = 0, kind = 0, wi = 0, wj = 0;
  int checks = 0, failures = 0;

  bister_wut #(.N(N)) dut (.tck, .bist_rst, .scan_mode, .scan_in, .swap_sel, .wut_drv, .adj_drv,
                           .wut_a_rx, .wut_b_rx, .pass_fail, .done);
  wut_route_model #(.N(N)) route (.drv(wut_drv), .adj(adj_drv), .rot, .kind, .wi, .wj,
                                  .a_rx(wut_a_rx), .b_rx(wut_b_rx));
  bister_wut #(.N(N), .K(K)) dut_g (.tck, .bist_rst, .scan_mode, .scan_in, .swap_sel,
                                    .wut_drv(g_drv), .adj_drv(g_adj), .wut_a_rx(g_a_rx),
                                    .wut_b_rx(g_b_rx), .pass_fail(g_pass_fail), .done(g_done));
  wut_route_model #(.N(N)) route_g (.drv(g_drv), .adj(g_adj), .rot, .kind, .wi, .wj,
                                    .a_rx(g_a_rx), .b_rx(g_b_rx));

  // opposite-value pairs seen during a grouped phase: [i][j][0] = (0,1), [1] = (1,0)
  bit seen_ww [N][N][2];
  bit seen_wa [N][N][2];
  always @(negedge tck) if (grouped && scan_mode && !g_done)
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (g_drv[i] != g_drv[j]) seen_ww[i][j][g_drv[i]] = 1'b1;
        if (g_drv[i] != g_adj[j]) seen_wa[i][j][g_drv[i]] = 1'b1;
      end

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(input string name, input int r, input int sw_rot, input int k,
                       input int i, input int j, input bit expect_fail);
    int cyc, len;
    logic d, pf;
    rot = r; kind = k; wi = i; wj = j;
    for (int o = 0; o < N; o++) swap_sel[o] = 2'((o + sw_rot) % N);
    scan_mode = 1'b0;
    @(negedge tck); bist_rst = 1'b1;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    len = grouped ? (1 << (2*K + 2)) : (1 << (2*N));
    cyc = 0;
    d = grouped ? g_done : done;
    while (!d && cyc < 1000) begin @(negedge tck); cyc++; d = grouped ? g_done : done; end
    check(cyc == len, $sformatf("%s: phase length %0d", name, cyc));
    @(negedge tck);
    pf = grouped ? g_pass_fail : pass_fail;
    check(pf == expect_fail, $sformatf("%s: result %0d expected %0d", name, pf, expect_fail));
    scan_mode = 1'b0; scan_in = ~pf;
    @(negedge tck);
    pf = grouped ? g_pass_fail : pass_fail;
    check(pf == scan_in, $sformatf("%s: scan shift", name));
    scan_in = 1'b0; kind = 0;
  endtask

  initial begin
    repeat (2) @(negedge tck);
    for (int r = 0; r < N; r++) begin
      phase("fault free", r, r, 0, 0, 0, 1'b0);
      if (r != 0) phase("swapper not set", r, 0, 0, 0, 0, 1'b1);
    end
    for (int i = 0; i < N; i++) begin
      int j;
      j = (i + 1) % N;
      phase("stuck-at-0", 1, 1, 1, i, 0, 1'b1);
      phase("stuck-at-1", 1, 1, 2, i, 0, 1'b1);
      phase("open", 1, 1, 3, i, 0, 1'b1);
      phase("wired-AND to neighbour bus", 2, 2, 4, i, i, 1'b1);
      phase("wired-OR to neighbour bus", 2, 2, 5, i, j, 1'b1);
      phase("neighbour dominant", 3, 3, 6, i, i, 1'b1);
      phase("short inside group", 3, 3, 7, i, j, 1'b1);
      phase("stuck-at-0 in B group", 1, 1, 8, i, 0, 1'b1);
    end
    // a short among three wires of the four-wire bus, as found in one faulty device
    for (int i = 0; i < N; i++) phase("three-wire short", 1, 1, 11, i, 0, 1'b1);
    // identical shorts in two sets: pairing (X,Y) passes, (Y,Z) and (Z,X) fail
    begin
      int i, j;
      i = int'($urandom % N); j = (i + 1 + int'($urandom % (N - 1))) % N;
      phase("X vs Y, identical shorts", 1, 1, 9, i, j, 1'b0);
      phase("Y vs Z, short in A group", 2, 2, 7, i, j, 1'b1);
      phase("Z vs X, short in B group", 3, 3, 10, i, j, 1'b1);
    end
    // grouped patterns: K wires at a time, the others constant
    grouped = 1'b1;
    phase("grouped, fault free", 1, 1, 0, 0, 0, 1'b0);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (i != j) check(seen_ww[i][j][0] && seen_ww[i][j][1],
                          $sformatf("grouped: wires %0d,%0d take both opposite pairs", i, j));
        check(seen_wa[i][j][0] && seen_wa[i][j][1],
              $sformatf("grouped: wire %0d, neighbour %0d take both opposite pairs", i, j));
      end
    for (int i = 0; i < N; i++) begin
      int j;
      j = (i + 1) % N;
      phase("grouped, stuck-at-0", 1, 1, 1, i, 0, 1'b1);
      phase("grouped, stuck-at-1", 1, 1, 2, i, 0, 1'b1);
      phase("grouped, wired-AND to neighbour bus", 2, 2, 4, i, (i + 2) % N, 1'b1);
      phase("grouped, wired-OR to neighbour bus", 2, 2, 5, i, j, 1'b1);
      phase("grouped, short across groups", 3, 3, 7, i, (i + 2) % N, 1'b1);
      phase("grouped, three-wire short", 1, 1, 11, i, 0, 1'b1);
    end
    phase("grouped, swapper not set", 1, 0, 0, 0, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
