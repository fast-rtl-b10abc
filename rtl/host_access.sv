// host_access: host path into the local memories and registers of the board.
//
// The host reaches every module through one address space: addr[19:16] selects the
// module (0-3 traffic generators, 4-7 input modules, 8-11 output modules, 12 the
// cell-time controller) and addr[15:0] is the address inside it. Writes are steered to
// the selected module only; reads return the selected module's read data, registered
// so the host sees it one clock after presenting the address.
// Local memories (VC tables, credits, alias tables) may only change while the
// simulation is stopped; a write to a module other than the controller while a run is
// in progress is refused and flagged on `host_err` for one clock, and counted.
//
// Routing the host's memory loading through one module follows the document; the
// address map, the read register and the refusal of writes during a run are this
// design's choices.
module host_access
  import fast_pkg::*;
#(
  parameter int unsigned N_TARGET = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               running,
  // host side
  input  logic               host_we,
  input  logic [19:0]        host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata,
  output logic               host_err,
  output logic [15:0]        refused_count,
  // module side
  output logic [N_TARGET-1:0] t_we,
  output logic [HADDR_W-1:0]  t_addr,
  output logic [HDATA_W-1:0]  t_wdata,
  input  logic [HRD_W-1:0]    t_rdata [N_TARGET]
);
  localparam int unsigned CTRL = N_TARGET - 1;

  logic [3:0] sel;
  logic       allowed;

  assign sel     = host_addr[19:16];
  assign allowed = !running || int'(sel) == CTRL;
  assign t_addr  = host_addr[15:0];
  assign t_wdata = host_wdata;

  always_comb begin
    t_we = '0;
    if (host_we && allowed && int'(sel) < N_TARGET) t_we[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rdata    <= '0;
      host_err      <= 1'b0;
      refused_count <= '0;
    end else begin
      host_rdata <= (int'(sel) < N_TARGET) ? t_rdata[sel] : '0;
      host_err   <= host_we && !allowed;
      if (host_we && !allowed) refused_count <= refused_count + 1'b1;
    end
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(t_we))
    else $error("host_access: write to several modules");
`endif

endmodule
