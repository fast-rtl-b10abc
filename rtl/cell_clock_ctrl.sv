// cell_clock_ctrl: global simulation clock of the board.
//
// The simulation advances in cell-times. The controller pulses `cell_start` to every
// module, then waits until each of the N_DONE modules has pulsed its `done_in` line and,
// on a master board, until the slave boards report `ext_done`; only then does the
// cell-time end, the cell-time counter `now` advance, and the next cell-time start.
// The cell-time therefore lasts as long as the slowest module needs.
// A master board starts cell-times by itself while running and passes each start to the
// slave boards on `sync_start`; a slave board starts a cell-time on `ext_start` and
// shows on `board_done` that its modules have finished the current one.
//
// Host registers (addr[1:0]): 0 write {master, run} (bit 1, bit 0); 1 and 2 write the
// low and high half of the cell-time limit (0 = no limit; the run stops when `now`
// reaches it). Reads: 0 {master, running}, 1 `now`.
// The start/wait-for-all scheme and the master/slave roles follow the document; the
// register map and the limit are this design's choices. On a master, `ext_done` is
// only looked at once all local modules are done, which is at least two clocks after
// the start, by which time slaves have dropped `board_done`.
module cell_clock_ctrl
  import fast_pkg::*;
#(
  parameter int unsigned N_DONE = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_DONE-1:0]  done_in,
  output logic               cell_start,
  output logic [TIME_W-1:0]  now,
  output logic               running,
  // board-to-board synchronisation
  input  logic               ext_start,
  input  logic               ext_done,
  output logic               sync_start,
  output logic               board_done,
  // host registers
  input  logic               host_we,
  input  logic [1:0]         host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata
);
  logic              master, run, busy;
  logic [31:0]       limit;
  logic [N_DONE-1:0] got;

  logic go, all_done;
  assign go       = !busy && (master ? (run && (limit == '0 || now < limit)) : ext_start);
  assign all_done = busy && (&(got | done_in)) && (!master || ext_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master     <= 1'b1;
      run        <= 1'b0;
      limit      <= '0;
      busy       <= 1'b0;
      got        <= '0;
      now        <= '0;
      cell_start <= 1'b0;
    end else begin
      cell_start <= 1'b0;
      if (go) begin
        cell_start <= 1'b1;
        busy       <= 1'b1;
        got        <= '0;
      end else if (busy) begin
        got <= got | done_in;
        if (all_done) begin
          busy <= 1'b0;
          now  <= now + 1'b1;
        end
      end
      if (host_we) begin
        unique case (host_addr)
          2'd0: begin run <= host_wdata[0]; master <= host_wdata[1]; end
          2'd1: limit[15:0]  <= host_wdata;
          2'd2: limit[31:16] <= host_wdata;
          default: ;
        endcase
      end
    end
  end

  assign sync_start = cell_start && master;
  assign board_done = !busy && !cell_start;
  assign running    = busy || go;

  always_comb begin
    unique case (host_addr)
      2'd0:    host_rdata = {30'h0, master, running};
      2'd1:    host_rdata = now;
      default: host_rdata = limit;
    endcase
  end

`ifndef SYNTHESIS
  // every module answers each start exactly once
  assert property (@(posedge clk) disable iff (!rst_n) (done_in & got) == '0)
    else $error("cell_clock_ctrl: a module signalled done twice in one cell-time");
  assert property (@(posedge clk) disable iff (!rst_n) !busy |-> (done_in == '0))
    else $error("cell_clock_ctrl: done outside a cell-time");
`endif

endmodule
