// input_module: distribution stage of the switch (one per input port).
//
// At each cell-time the module takes the cell its traffic generator presents, looks up
// the cell's VCI in the VC translation table held in local memory, and drives the cell
// onto the dedicated path to the output module the table names; the other three paths
// carry no cell. A VCI whose table entry is not enabled is dropped and counted.
// Counters of received, dropped and per-port forwarded cells give the input-side
// statistics.
//
// Timing: `cell_start` is sampled on a clock edge, which also captures `tg_cell`; the
// table is read in the next clock and the paths are updated on the following edge,
// together with a one-cycle `done`. Paths then hold until the next cell-time, so the
// output modules read at the next `cell_start` the cell forwarded in this one.
// Host port (addr[15:12]): 0 = VC table, entry = addr[7:0], bits {enable, port[1:0]};
// 2 = counters (read): 0 received, 1 dropped, 2..5 forwarded to port 0..3.
// Table lookup and forwarding follow the document; the entry format, the drop rule for
// unmapped VCIs and the counter set are this design's choice.
module input_module
  import fast_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cell_start,
  output logic               done,
  input  cell_t              tg_cell,
  output path_t              out_path [N_PORTS],
  input  logic               host_we,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata
);
  typedef struct packed {
    logic              en;
    logic [PORT_W-1:0] port;
  } vc_entry_t;

  vc_entry_t   vc_table [1 << VCI_W];

  logic        busy;
  cell_t       cell_r;
  logic [31:0] rx_count, drop_count;
  logic [31:0] fwd_count [N_PORTS];

  always_ff @(posedge clk) begin
    if (host_we && host_addr[15:12] == 4'h0)
      vc_table[host_addr[VCI_W-1:0]] <= vc_entry_t'(host_wdata[PORT_W:0]);
  end

  vc_entry_t ent;
  assign ent = vc_table[cell_r.vci];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      cell_r     <= '0;
      rx_count   <= '0;
      drop_count <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        out_path[p]  <= '0;
        fwd_count[p] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (cell_start && !busy) begin
        cell_r <= tg_cell;
        busy   <= 1'b1;
      end else if (busy) begin
        busy <= 1'b0;
        done <= 1'b1;
        for (int p = 0; p < N_PORTS; p++)
          out_path[p] <= cell_to_path((cell_r.valid && ent.en && ent.port == PORT_W'(p))
                                      ? cell_r : cell_t'('0));
        if (cell_r.valid) begin
          rx_count <= rx_count + 1'b1;
          if (!ent.en) drop_count <= drop_count + 1'b1;
          else         fwd_count[ent.port] <= fwd_count[ent.port] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    if (host_addr[15:12] == 4'h0)
      host_rdata = {29'h0, vc_table[host_addr[VCI_W-1:0]]};
    else if (host_addr[15:12] == 4'h2) begin
      case (host_addr[2:0])
        3'd0:    host_rdata = rx_count;
        3'd1:    host_rdata = drop_count;
        3'd2:    host_rdata = fwd_count[0];
        3'd3:    host_rdata = fwd_count[1];
        3'd4:    host_rdata = fwd_count[2];
        3'd5:    host_rdata = fwd_count[3];
        default: host_rdata = '0;
      endcase
    end
  end

`ifndef SYNTHESIS
  // a cell leaves on at most one path
  always_ff @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int p = 0; p < N_PORTS; p++) n += int'(out_path[p].sig[0]);
    assert (n <= 1) else $error("input_module: cell on several paths");
  end
`endif

endmodule
