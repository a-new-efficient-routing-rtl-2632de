// bios_fifo: register-based input buffer of one router input channel.
//
// Each input port of the BIOS router buffers incoming flits before they cross
// the crossbar; the document builds its FIFOs from registers and evaluates a
// depth of 5 flits of 32 bits. This is a circular buffer of DEPTH registers
// with a read pointer, a write pointer and an occupancy counter. The head
// entry is read combinationally (rd_data is valid whenever empty is low), so a
// flit written in cycle t can leave in cycle t+1. A write to a full buffer and
// a read from an empty one are ignored; a write and a read in the same cycle
// are allowed at any occupancy other than full+write. count is registered
// state and feeds the congestion flag and the neighbour's output selector.
module bios_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 5,
  localparam int CW   = $clog2(DEPTH + 1),
  localparam int PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr] <= wr_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

endmodule
