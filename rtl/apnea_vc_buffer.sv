// apnea_vc_buffer: one power-gated physical input buffer (flit FIFO).
//
// A DEPTH-entry circular FIFO of flits. It holds data only while `powered`
// is high (its power state is ON); while it is off, waking or going to
// sleep its pointers are held at zero, which models the loss of the contents
// when the supply is cut. Write and read in the same cycle are allowed; the
// head flit is visible on rd_flit whenever rd_valid is high (no read
// latency). Writing when full or unpowered is a protocol error caught by an
// assertion: credit-based flow control and the power-gating policy must make
// both impossible. Depth 4 is the document's evaluated buffer depth.
module apnea_vc_buffer
  import apnea_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  powered,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output logic  rd_valid,
  output flit_t rd_flit,
  output logic  empty
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_BITS = $clog2(DEPTH + 1);

  flit_t               mem [DEPTH];
  logic [PTR_W-1:0]    wr_ptr, rd_ptr;
  logic [CNT_BITS-1:0] count;
  logic                do_wr, do_rd;

  assign empty    = (count == '0);
  assign rd_valid = powered && !empty;
  assign rd_flit  = mem[rd_ptr];
  assign do_wr    = powered && wr_en;
  assign do_rd    = rd_en && rd_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
    end else if (!powered) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CNT_BITS'(do_wr) - CNT_BITS'(do_rd);
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wr_ptr] <= wr_flit;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_en |-> (powered && (count != CNT_BITS'(DEPTH) || rd_en)))
    else $error("write into a full or unpowered buffer");
endmodule
