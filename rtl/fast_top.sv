// fast_top: the FAST-1 board set up as a 4x4 output-buffered ATM switch with weighted
// round-robin scheduling at each output port.
//
// Four traffic generators produce one cell per cell-time each. Input module i takes the
// cells of traffic generator i, translates their VCI to an output port and forwards them
// over the dedicated path to that output module; the sixteen paths form the full
// bipartite interconnect between input and output modules. Each output module queues
// the cells of up to four inputs per cell-time per VC and transmits at most one cell per
// cell-time, chosen by weighted round robin with credits and an ABR queue.
// The cell-time controller starts every cell-time in all twelve modules at once and
// waits for all of them (and, on a master board, for slave boards); cells move one stage
// per cell-time, since each stage reads what the previous stage produced in the
// previous cell-time. The host loads the tables and reads the counters through the
// host access block while the simulation is stopped.
//
// Host address map: addr[19:16] selects the module (0-3 traffic generator, 4-7 input
// module, 8-11 output module, 12 controller), addr[15:0] is the module's own map (see
// each module). `host_rdata` is registered (one clock after the address).
// Outputs per output port: the cell sent in the last cell-time, its queue, whether it
// was sent without credit, its queueing delay, and a pulse when a frame began.
// `host_err` flags a refused write (a module write during a run), `host_refused`
// counts them. Board cascading uses ext_start/ext_done/sync_start/
// board_done. The partitioning of functions over the modules follows the document.
module fast_top
  import fast_pkg::*;
#(
  parameter int unsigned NCELLS      = 32768,
  parameter int unsigned NQ          = 32,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // host access
  input  logic               host_we,
  input  logic [19:0]        host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata,
  output logic               host_err,
  output logic [15:0]        host_refused,
  // board synchronisation
  input  logic               ext_start,
  input  logic               ext_done,
  output logic               sync_start,
  output logic               board_done,
  output logic [TIME_W-1:0]  now,
  output logic               running,
  // output links
  output cell_t              tx_cell   [N_PORTS],
  output logic [5:0]         tx_queue  [N_PORTS],
  output logic               tx_round2 [N_PORTS],
  output logic [15:0]        tx_delay  [N_PORTS],
  output logic               frame_start [N_PORTS],
  // cascade connectors: output port i sends its cells to another board ...
  output logic [15:0]        lnk_out_data [N_PORTS],
  output logic [3:0]         lnk_out_ctrl [N_PORTS],
  input  logic               lnk_out_ack  [N_PORTS],
  // ... and traffic generator i can take its cells from another board or a source
  input  logic [15:0]        lnk_in_data  [N_PORTS],
  input  logic               lnk_in_req   [N_PORTS],
  output logic               lnk_in_ack   [N_PORTS]
);
  localparam int unsigned NT = 3 * N_PORTS + 1;
  localparam logic [126:0] SEED_BASE = 127'h2f6b_91d4_07c3_58ea_b16d_3a9f_c24e_7051;

  function automatic logic [126:0] seed_of(input int unsigned i);
    logic [253:0] d;
    d = {SEED_BASE, SEED_BASE} << (13 * i);       // rotate left by 13*i;
    return d[253:127] ^ 127'(i + 1);              // the low half is the wrapped copy
  endfunction

  logic               cell_start;
  logic [N_PORTS-1:0] tg_done, im_done, om_done;
  cell_t              tg_cell [N_PORTS];
  path_t              im_path [N_PORTS][N_PORTS];   // [input][output]
  path_t              om_in   [N_PORTS][N_PORTS];   // [output][input]

  logic [NT-1:0]      t_we;
  logic [HADDR_W-1:0] t_addr;
  logic [HDATA_W-1:0] t_wdata;
  logic [HRD_W-1:0]   t_rdata [NT];

  cell_clock_ctrl #(.N_DONE(3 * N_PORTS)) u_ctrl (
    .clk, .rst_n,
    .done_in({om_done, im_done, tg_done}),
    .cell_start, .now, .running,
    .ext_start, .ext_done, .sync_start, .board_done,
    .host_we(t_we[NT-1]), .host_addr(t_addr[1:0]), .host_wdata(t_wdata),
    .host_rdata(t_rdata[NT-1]));

  host_access #(.N_TARGET(NT)) u_host (
    .clk, .rst_n, .running,
    .host_we, .host_addr, .host_wdata, .host_rdata, .host_err, .refused_count(host_refused),
    .t_we, .t_addr, .t_wdata, .t_rdata);

  for (genvar i = 0; i < N_PORTS; i++) begin : g_port
    traffic_generator #(.SEED(seed_of(i)), .DELAY_DEPTH(DELAY_DEPTH)) u_tg (
      .clk, .rst_n, .cell_start,
      .done(tg_done[i]), .cell_out(tg_cell[i]),
      .ext_data(lnk_in_data[i]), .ext_req(lnk_in_req[i]), .ext_ack(lnk_in_ack[i]),
      .host_we(t_we[i]), .host_addr(t_addr), .host_wdata(t_wdata),
      .host_rdata(t_rdata[i]));

    input_module u_im (
      .clk, .rst_n, .cell_start,
      .done(im_done[i]), .tg_cell(tg_cell[i]), .out_path(im_path[i]),
      .host_we(t_we[N_PORTS + i]), .host_addr(t_addr), .host_wdata(t_wdata),
      .host_rdata(t_rdata[N_PORTS + i]));

    // full bipartite interconnect: path from input j to output i
    for (genvar j = 0; j < N_PORTS; j++) begin : g_path
      assign om_in[i][j] = im_path[j][i];
    end

    output_module #(.NCELLS(NCELLS), .NQ(NQ)) u_om (
      .clk, .rst_n, .cell_start, .now,
      .in_path(om_in[i]),
      .done(om_done[i]),
      .tx_cell(tx_cell[i]), .tx_queue(tx_queue[i]), .tx_round2(tx_round2[i]),
      .tx_delay(tx_delay[i]), .frame_start(frame_start[i]),
      .host_we(t_we[2*N_PORTS + i]), .host_addr(t_addr), .host_wdata(t_wdata),
      .host_rdata(t_rdata[2*N_PORTS + i]));

    // every transmitted cell also leaves on the port's cascade connector
    logic        ctx_idle;
    logic [15:0] ctx_overflow;

    cascade_tx #(.DEPTH(16)) u_ctx (
      .clk, .rst_n,
      .in_valid(om_done[i] && tx_cell[i].valid),
      .in_word({7'h0, tx_cell[i]}),
      .lnk_data(lnk_out_data[i]), .lnk_ctrl_out(lnk_out_ctrl[i]), .lnk_ack(lnk_out_ack[i]),
      .idle(ctx_idle), .overflow(ctx_overflow));
  end

endmodule
