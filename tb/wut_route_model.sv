// wut_route_model: behavioural model of the routing that a wire BISTER tests.
// Not synthesizable logic of the design: it stands in for FPGA wire segments
// and switches. Both WUT groups carry drv; group B arrives rotated by rot
// places (as a rotating bus does); adj is the neighbouring bus. One fault can
// be injected: a stuck wire, an open wire (the receiver keeps the value it
// had when the open appeared), a wired-AND, wired-OR or dominant short
// between A wire i and neighbour wire j, or a wired-AND short between wires
// i and j of group A, of group B, or of both (identical faults), or a
// wired-AND short among three wires i, i+1, i+2 of group A.
module wut_route_model #(
  parameter int N = 4
) (
  input  logic [N-1:0] drv,
  input  logic [N-1:0] adj,
  input  int           rot,
  input  int           kind,   // 0 none 1 sa0 2 sa1 3 open 4 and-adj 5 or-adj 6 adj-dominant 7 and-within 8 sa0 on B 9 and-within A and B 10 and-within B 11 three-wire and-within A
  input  int           wi,
  input  int           wj,
  output logic [N-1:0] a_rx,
  output logic [N-1:0] b_rx
);
  logic open_val = 1'b0;
  always @(kind) if (kind == 3) open_val = drv[wi];

  always_comb begin
    logic [N-1:0] b;
    a_rx = drv;
    case (kind)
      1: a_rx[wi] = 1'b0;
      2: a_rx[wi] = 1'b1;
      3: a_rx[wi] = open_val;
      4: a_rx[wi] = drv[wi] & adj[wj];
      5: a_rx[wi] = drv[wi] | adj[wj];
      6: a_rx[wi] = adj[wj];
      11: for (int k = 0; k < 3; k++)
            a_rx[(wi + k) % N] = drv[wi % N] & drv[(wi + 1) % N] & drv[(wi + 2) % N];
      7, 9: begin a_rx[wi] = drv[wi] & drv[wj]; a_rx[wj] = drv[wi] & drv[wj]; end
      default: ;
    endcase
    b = drv;
    if (kind == 8) b[wi] = 1'b0;
    if (kind == 9 || kind == 10) begin b[wi] = drv[wi] & drv[wj]; b[wj] = drv[wi] & drv[wj]; end
    for (int k = 0; k < N; k++) b_rx[(k + rot) % N] = b[k];
  end
endmodule
