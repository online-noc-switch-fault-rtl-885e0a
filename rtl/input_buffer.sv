// input_buffer: flit FIFO at one switch input port.
//
// Each of the five input ports of the switch holds its incoming flits in a
// small buffer, as drawn at every port of the switch structure. This is a
// plain synchronous FIFO of DEPTH flits held in a register array with read
// and write pointers and an occupancy count.
//
// Interface: valid/ready on both sides. in_ready is !full and depends only
// on the stored count, so no combinational path runs from the read side to
// in_ready; this keeps the mesh free of combinational loops. A write and a
// read may happen in the same cycle. out_valid/out_flit show the oldest
// flit; it leaves when out_ready is high. One cycle from write to read.
//
// The depth (4 flits) is this design's choice; the document draws buffers
// but gives no depth.
module input_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             mem [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [PW:0]       count;
  logic              push, pop;

  assign in_ready  = (count != (PW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

endmodule
