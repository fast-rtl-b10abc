// markov_source: video-like traffic source driven by a Markov chain.
//
// The source is always in one of NS states. Each state has a cell rate, written by the
// host as a 16-bit probability: in every cell-time the source sends one cell, on its
// VCI, when a fresh 16-bit random number is below the rate of the current state. Every
// `hold` cell-times (a video frame time, for instance) the chain moves: the next state
// is drawn from the current state's transition vector, which is an alias table of NS
// entries. All NS transition tables sit in one alias_sampler, indexed by {state, I}, so
// entry j of the table of state s stands for a move to state j; a table with few
// non-zero transitions simply aliases the rest onto them. The first cell-time after
// reset draws the initial state uniformly and sends nothing.
//
// Two Tausworthe generators are used: A for the initial state and the transitions,
// B for the per-cell-time rate decision.
// Timing: `tick` (one per cell-time) decides this cell-time's cell, registered on
// `cell_out` in the next clock. When the chain moves, the next state is drawn in the
// four following clocks (`busy` high) and applies from the next cell-time.
// Host port: addr[11:10] = 0 transition tables (addr[IDX_W] selects the alias table,
// addr[IDX_W-1:0] = {state, entry}); 1 registers (addr[4] = 0: rate of state addr[3:0];
// addr[4:0] = 16: hold time in cell-times, 0 counts as 1); 2 (read) current state.
// The Markov chain, the uniform initial state, one transition table per state and a
// per-state rate follow the document; the number of states, the Bernoulli rate
// encoding and moving once every `hold` cell-times are this design's choices.
module markov_source
  import fast_pkg::*;
#(
  parameter int unsigned  NS     = 16,
  parameter logic [126:0] SEED_A = 127'h3141_5926_5358_9793_2384_6264_3383_2795,
  parameter logic [126:0] SEED_B = 127'h2718_2818_2845_9045_2353_6028_7471_3526
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [VCI_W-1:0]   vci,
  output cell_t              cell_out,
  output logic               busy,
  output logic [$clog2(NS)-1:0] state,
  input  logic               host_we,
  input  logic [11:0]        host_addr,
  input  logic [15:0]        host_wdata,
  output logic [15:0]        host_rdata
);
  localparam int unsigned SW    = $clog2(NS);
  localparam int unsigned IDX_W = 2 * SW;

  typedef enum logic [2:0] {M_IDLE, M_U, M_I, M_READ, M_LOAD} mstate_t;
  mstate_t st;

  logic        started;
  logic        step_a, step_b;
  logic [15:0] rnd_a, rnd_b, u_a;
  logic [15:0] rate [NS];
  logic [15:0] hold, cnt;

  tausworthe_rng #(.SEED(SEED_A)) u_rng_a (.clk, .rst_n, .step(step_a), .rnd(rnd_a));
  tausworthe_rng #(.SEED(SEED_B)) u_rng_b (.clk, .rst_n, .step(step_b), .rnd(rnd_b));

  logic             t_valid;
  logic [IDX_W-1:0] t_val;
  logic [15:0]      t_rdata;

  alias_sampler #(.IDX_W(IDX_W)) u_trans (
    .clk, .rst_n, .req(st == M_I), .u(u_a), .idx({state, rnd_a[SW-1:0]}),
    .val_valid(t_valid), .val(t_val),
    .host_we(host_we && host_addr[11:10] == 2'd0), .host_addr(host_addr[IDX_W:0]),
    .host_wdata, .host_rdata(t_rdata));

  logic [15:0] hold_eff;
  assign hold_eff = (hold == '0) ? 16'd1 : hold;
  assign busy     = (st != M_IDLE);
  assign step_a   = (st == M_IDLE && tick && !started) || st == M_U || st == M_I;
  assign step_b   = (st == M_IDLE && tick && started);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; started <= 1'b0; state <= '0; cnt <= '0; u_a <= '0;
      cell_out <= '0; hold <= 16'd1;
      for (int s = 0; s < NS; s++) rate[s] <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (tick) begin
          if (!started) begin
            state    <= rnd_a[SW-1:0];       // uniform initial state
            started  <= 1'b1;
            cnt      <= hold_eff;
            cell_out <= '0;
          end else begin
            cell_out <= (rnd_b < rate[state]) ? '{valid: 1'b1, vci: vci} : cell_t'('0);
            if (cnt > 16'd1) cnt <= cnt - 1'b1;
            else begin
              cnt <= hold_eff;
              st  <= M_U;
            end
          end
        end
        M_U:    begin u_a <= rnd_a; st <= M_I; end
        M_I:    st <= M_READ;
        M_READ: st <= M_LOAD;
        M_LOAD: begin state <= t_val[SW-1:0]; st <= M_IDLE; end
        default: st <= M_IDLE;
      endcase
      if (host_we && host_addr[11:10] == 2'd1) begin
        if (!host_addr[4])               rate[host_addr[SW-1:0]] <= host_wdata;
        else if (host_addr[3:0] == 4'd0) hold <= host_wdata;
      end
    end
  end

  always_comb begin
    unique case (host_addr[11:10])
      2'd0:    host_rdata = t_rdata;
      2'd1:    host_rdata = host_addr[4] ? hold : rate[host_addr[SW-1:0]];
      2'd2:    host_rdata = 16'(state);
      default: host_rdata = '0;
    endcase
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) (st == M_LOAD) |-> t_valid)
    else $error("markov_source: transition result not ready");
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !tick)
    else $error("markov_source: tick while drawing");
`endif

endmodule
