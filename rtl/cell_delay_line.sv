// cell_delay_line: constant link delay of a cell stream, held in local memory.
//
// Cells are written into a circular buffer at the write pointer; the read pointer
// trails it by a fixed distance D. At every cell-time (`advance`) the cell under the
// read pointer is presented, the new cell is stored under the write pointer, and both
// pointers move on by one with wrap-around, so each cell leaves exactly D cell-times
// after it entered. This models propagation delay of a physical link and interface.
//
// Interface: `load` (simulation stopped) sets D from `delay` (0 <= D < DEPTH) and
// restarts the pipeline empty; D = 0 passes the cell through in the same cell-time.
// `out_cell` is registered and changes on the clock edge where `advance` is high.
// Until D cells have entered, the slots read hold no cell and `out_cell` is invalid.
// The two-pointer scheme follows the document; DEPTH, D = 0 bypass and the
// fill tracking are this design's choices.
module cell_delay_line
  import fast_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic                     advance,
  input  cell_t                    in_cell,
  output cell_t                    out_cell
);
  localparam int unsigned AW = $clog2(DEPTH);

  cell_t          mem [DEPTH];
  logic [AW-1:0]  wp, rp, d;
  logic [AW:0]    fill;           // cells entered since load, saturating at d

  always_ff @(posedge clk) begin
    if (advance && d != '0) mem[wp] <= in_cell;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; d <= '0; fill <= '0; out_cell <= '0;
    end else if (load) begin
      d    <= delay;
      rp   <= wp - delay;
      fill <= '0;
      out_cell <= '0;
    end else if (advance) begin
      wp <= wp + 1'b1;
      rp <= rp + 1'b1;
      if (d == '0)                 out_cell <= in_cell;
      else if (fill >= {1'b0, d})  out_cell <= mem[rp];
      else                         out_cell <= '0;
      if (fill < {1'b0, d}) fill <= fill + 1'b1;
    end
  end

`ifndef SYNTHESIS
  // the pointers stay a constant distance apart
  assert property (@(posedge clk) disable iff (!rst_n) (!load) |-> (wp - rp == d))
    else $error("cell_delay_line: pointer distance broken");
`endif

endmodule
