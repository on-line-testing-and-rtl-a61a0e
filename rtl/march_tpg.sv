// march_tpg: state-machine test pattern generator for BUTs in RAM modes.
//
// The document tests the LUT/RAM module in its RAM modes with a state
// machine that produces a standard RAM test sequence. This generator
// produces March C-, a standard march test:
//   up/down(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up/down(r0)
// One operation is issued per clock: addr, wdata and we describe it, and
// exp is the value a fault-free RAM returns for a read (useful to a
// stand-alone checker; inside a BISTER the two BUTs are compared instead).
// bist_rst (synchronous, active high) restarts the test; done rises after
// the last read, 10 * 2^AW operations later, and the outputs then hold with
// we low. A read is one cycle with we low; the BUT's read data appear during
// that cycle for an asynchronous RAM, one cycle later for a synchronous one.
//
// The choice of March C- and the one-operation-per-cycle timing are this
// design's own; the document names only "standard RAM test sequences".
module march_tpg #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          bist_rst,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] wdata,
  output logic          we,
  output logic [DW-1:0] exp,
  output logic          done
);

  // March element: [2:0] index 0..5; operations per element below.
  logic [2:0] elem;
  logic       op;            // operation index within an element
  logic [AW-1:0] cnt;        // address step within an element

  logic       ops2;          // element has two operations
  logic       down;          // element walks addresses downward
  logic       rd_val;        // value read by the first operation
  logic       wr_val;        // value written by the write operation
  logic       is_write;

  always_comb begin
    ops2   = (elem != 3'd0) && (elem != 3'd5);
    down   = (elem == 3'd3) || (elem == 3'd4);
    rd_val = (elem == 3'd2) || (elem == 3'd4);
    wr_val = (elem == 3'd1) || (elem == 3'd3);
    is_write = (elem == 3'd0) || (ops2 && op);
  end

  always_ff @(posedge clk) begin
    if (bist_rst) begin
      elem <= '0;
      op   <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else if (en && !done) begin
      if (ops2 && !op) begin
        op <= 1'b1;
      end else begin
        op <= 1'b0;
        if (&cnt) begin
          cnt <= '0;
          if (elem == 3'd5) done <= 1'b1;
          else              elem <= elem + 3'd1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign addr  = down ? ~cnt : cnt;
  assign we    = is_write && !done;
  assign wdata = {DW{(elem == 3'd0) ? 1'b0 : wr_val}};
  assign exp   = {DW{rd_val}};

endmodule
