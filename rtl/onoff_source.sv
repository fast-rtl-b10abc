// onoff_source: ON-OFF traffic source driven by three alias-method lookup tables.
//
// The source alternates between an OFF period and an ON period. The length of each
// period, in cell-times, is drawn from its own table (table 0: ON lengths, table 1: OFF
// lengths), so exponential ON/OFF times are obtained by loading discretised
// exponential distributions. At the start of an ON period a burst size is drawn from
// table 2 (a geometric distribution, for instance); the source then sends one cell per
// cell-time, on its VCI, until the burst is sent or the ON period ends, whichever
// comes first. Each table is an alias_sampler; two Tausworthe generators with
// different seeds give the fractions and indices, so the ON length and the burst size
// drawn together come from independent numbers.
//
// Timing: `tick` (one per cell-time, sampled on a clock edge) decides this cell-time's
// cell, registered on `cell_out` in the next clock. When a period ends, the next period is
// drawn in the following four clocks (`busy` high); the source is idle again five
// clocks after `tick`. A drawn length of 0 counts as 1 cell-time. After reset the
// source is OFF with nothing drawn, so the first tick draws an ON period.
// Host port: addr[11:10] selects the table, addr[9:0] the entry as in alias_sampler.
// Three tables and their roles follow the document; the burst-within-ON rule, the
// table size (values 0..511) and the zero-length rule are this design's choices.
module onoff_source
  import fast_pkg::*;
#(
  parameter logic [126:0] SEED_A = 127'h1d2c_3b4a_5968_7786_95a4_b3c2_d1e0_f00f,
  parameter logic [126:0] SEED_B = 127'h6e5d_4c3b_2a19_0817_f6e5_d4c3_b2a1_9087
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [VCI_W-1:0]   vci,
  output cell_t              cell_out,
  output logic               busy,
  output logic               on,
  input  logic               host_we,
  input  logic [11:0]        host_addr,
  input  logic [15:0]        host_wdata,
  output logic [15:0]        host_rdata
);
  typedef enum logic [2:0] {O_IDLE, O_U, O_I, O_READ, O_LOAD} ostate_t;
  ostate_t st;

  logic        step;
  logic [15:0] rnd_a, rnd_b, u_a, u_b;
  logic [8:0]  time_left, burst_left;

  tausworthe_rng #(.SEED(SEED_A)) u_rng_a (.clk, .rst_n, .step, .rnd(rnd_a));
  tausworthe_rng #(.SEED(SEED_B)) u_rng_b (.clk, .rst_n, .step, .rnd(rnd_b));

  logic       req;
  logic [2:0] t_v;
  logic [8:0] v_on, v_off, v_burst;
  logic [15:0] rd [3];

  assign req  = (st == O_I);
  assign step = (st == O_U) || (st == O_I);

  // the samplers for the ON length and the OFF length share numbers from generator A;
  // the burst size uses generator B
  alias_sampler #(.IDX_W(9)) u_on (
    .clk, .rst_n, .req, .u(u_a), .idx(rnd_a[8:0]), .val_valid(t_v[0]), .val(v_on),
    .host_we(host_we && host_addr[11:10] == 2'd0), .host_addr(host_addr[9:0]),
    .host_wdata, .host_rdata(rd[0]));
  alias_sampler #(.IDX_W(9)) u_off (
    .clk, .rst_n, .req, .u(u_a), .idx(rnd_a[8:0]), .val_valid(t_v[1]), .val(v_off),
    .host_we(host_we && host_addr[11:10] == 2'd1), .host_addr(host_addr[9:0]),
    .host_wdata, .host_rdata(rd[1]));
  alias_sampler #(.IDX_W(9)) u_burst (
    .clk, .rst_n, .req, .u(u_b), .idx(rnd_b[8:0]), .val_valid(t_v[2]), .val(v_burst),
    .host_we(host_we && host_addr[11:10] == 2'd2), .host_addr(host_addr[9:0]),
    .host_wdata, .host_rdata(rd[2]));

  assign host_rdata = (host_addr[11:10] == 2'd3) ? 16'h0 : rd[host_addr[11:10]];
  assign busy       = (st != O_IDLE);

  logic emit;
  assign emit = on && burst_left != '0 && time_left != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= O_IDLE; on <= 1'b0; time_left <= '0; burst_left <= '0;
      u_a <= '0; u_b <= '0; cell_out <= '0;
    end else begin
      unique case (st)
        O_IDLE: if (tick) begin
          cell_out <= emit ? '{valid: 1'b1, vci: vci} : cell_t'('0);
          if (emit) burst_left <= burst_left - 1'b1;
          if (time_left > 9'd1) time_left <= time_left - 1'b1;
          else begin
            time_left <= '0;
            st        <= O_U;                 // period over: draw the next one
          end
        end
        O_U:    begin u_a <= rnd_a; u_b <= rnd_b; st <= O_I; end
        O_I:    st <= O_READ;
        O_READ: st <= O_LOAD;
        O_LOAD: begin                         // sampler results valid now
          on <= !on;
          if (!on) begin
            time_left  <= (v_on == '0) ? 9'd1 : v_on;
            burst_left <= v_burst;
          end else begin
            time_left  <= (v_off == '0) ? 9'd1 : v_off;
            burst_left <= '0;
          end
          st <= O_IDLE;
        end
        default: st <= O_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) (st == O_LOAD) |-> (&t_v))
    else $error("onoff_source: table results not ready");
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !tick)
    else $error("onoff_source: tick while drawing");
`endif

endmodule
