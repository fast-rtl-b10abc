// traffic_generator: traffic generator module, one cell per cell-time.
//
// A Tausworthe generator supplies uniform 16-bit numbers; two successive numbers give
// the alias method its fraction U and its index I. The alias sampler's tables hold a
// distribution over the 9-bit cell codes {valid, VCI}, so one draw decides both whether
// a cell is sent in this cell-time and on which virtual channel: the load and the VC
// mix of the source are set entirely by the tables the host loads. The drawn cell then
// passes through the constant link-delay pipeline and is presented on `cell_out`.
//
// Timing: generating a cell takes six clocks. `cell_start` is sampled on a clock edge
// (clock 1); the next four clocks draw U, draw I, read the tables and compare (the cell
// enters the delay line), and the sixth registers the delay line's output into
// `cell_out` and raises `done` for one cycle. `cell_out` holds until the next cell.
// In external mode the cell is not drawn but taken from cells that arrived on the
// external connector (16 data lines with a REQ/ACK handshake, see cascade_rx) and wait
// in a FIFO in local memory; one is forwarded per cell-time, and none when the FIFO is
// empty. The cell code is the low 9 bits of the received word. In ON-OFF mode the cell
// comes from an onoff_source (ON length, OFF length and burst size tables), and in
// Markov mode from a markov_source (a chain whose state sets the cell rate); both send
// on the VCI held in register 2 and have their own generators, seeded from SEED
// rotated so that they differ from the main one. Both are ready again well before the
// next cell-time, so the six-clock generation is the same in every mode.
// Host port (addr[15:12]): 0 = alias tables (addr[9] selects F or L); 1 = registers
// (addr 0: link delay in cell-times, written and applied at once; addr 1: mode, bit 0
// enable, bit 1 external, bit 2 ON-OFF, bit 3 Markov, taking priority in that order,
// read back with the ON flag in bit 4 and the Markov state in bits 8:5; addr 2: VCI of
// the ON-OFF and Markov sources); 3 = ON-OFF tables (addr[11:10] table, addr[9:0]
// entry); 4 = Markov source (its own map in addr[11:0]). Reads of region 2: 0 valid
// cells sent to the input module, 1 cells waiting from the external source, 2 external
// cells dropped (FIFO full).
// The RNG/alias/delay structure, the six-cycle generation, the external source with
// local buffering, the ON-OFF source and the Markov source follow the document; the
// use of the table range as cell codes, the FIFO depth and the register map are this
// design's choices.
module traffic_generator
  import fast_pkg::*;
#(
  parameter logic [126:0] SEED        = 127'h5a5a_0f0f_3c3c_9696_a5a5_f0f0_c3c3_6969,
  parameter int unsigned  DELAY_DEPTH = 1024,
  parameter int unsigned  EXT_DEPTH   = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cell_start,
  output logic               done,
  output cell_t              cell_out,
  // external cell source (20-line connector: 16 data, REQ in, ACK out)
  input  logic [15:0]        ext_data,
  input  logic               ext_req,
  output logic               ext_ack,
  input  logic               host_we,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata
);
  localparam int unsigned DW = $clog2(DELAY_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_DRAW_U, S_DRAW_I, S_READ, S_CMP, S_OUT} state_t;
  state_t state;

  logic        step;
  logic [15:0] rnd, u_r;
  logic        enable, ext_mode, oo_mode, mk_mode;
  logic [VCI_W-1:0] oo_vci;
  logic [31:0] gen_count;

  tausworthe_rng #(.P(127), .Q(1), .L(16), .SEED(SEED)) u_rng (
    .clk, .rst_n, .step, .rnd);

  logic           a_req, a_valid;
  logic [CELL_W-1:0] a_val;
  logic [15:0]    a_rdata;

  alias_sampler #(.IDX_W(CELL_W)) u_alias (
    .clk, .rst_n,
    .req(a_req), .u(u_r), .idx(rnd[CELL_W-1:0]),
    .val_valid(a_valid), .val(a_val),
    .host_we(host_we && host_addr[15:12] == 4'h0),
    .host_addr(host_addr[CELL_W:0]),
    .host_wdata(host_wdata),
    .host_rdata(a_rdata));

  logic  dl_load, dl_adv;
  cell_t dl_in, dl_out;

  cell_delay_line #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst_n,
    .load(dl_load), .delay(host_wdata[DW-1:0]),
    .advance(dl_adv), .in_cell(dl_in), .out_cell(dl_out));

  logic                      x_pop, x_valid;
  logic [15:0]               x_word, x_overflow;
  logic [$clog2(EXT_DEPTH):0] x_level;

  cascade_rx #(.DEPTH(EXT_DEPTH)) u_ext (
    .clk, .rst_n,
    .lnk_data(ext_data), .lnk_req(ext_req), .lnk_ack(ext_ack),
    .pop(x_pop), .out_valid(x_valid), .out_word(x_word),
    .level(x_level), .overflow(x_overflow));

  logic        oo_tick, oo_busy, oo_on;
  cell_t       oo_cell;
  logic [15:0] oo_rdata;

  assign oo_tick = (state == S_IDLE) && cell_start && enable && oo_mode && !ext_mode;

  onoff_source #(
    .SEED_A({SEED[63:0], SEED[126:64]} ^ 127'h1),
    .SEED_B({SEED[31:0], SEED[126:32]} ^ 127'h2)
  ) u_onoff (
    .clk, .rst_n, .tick(oo_tick), .vci(oo_vci), .cell_out(oo_cell),
    .busy(oo_busy), .on(oo_on),
    .host_we(host_we && host_addr[15:12] == 4'h3), .host_addr(host_addr[11:0]),
    .host_wdata, .host_rdata(oo_rdata));

  logic        mk_tick, mk_busy;
  logic [3:0]  mk_state;
  cell_t       mk_cell;
  logic [15:0] mk_rdata;

  assign mk_tick = (state == S_IDLE) && cell_start && enable && mk_mode && !ext_mode && !oo_mode;

  markov_source #(
    .NS(16),
    .SEED_A({SEED[95:0], SEED[126:96]} ^ 127'h3),
    .SEED_B({SEED[15:0], SEED[126:16]} ^ 127'h4)
  ) u_markov (
    .clk, .rst_n, .tick(mk_tick), .vci(oo_vci), .cell_out(mk_cell),
    .busy(mk_busy), .state(mk_state),
    .host_we(host_we && host_addr[15:12] == 4'h4), .host_addr(host_addr[11:0]),
    .host_wdata, .host_rdata(mk_rdata));

  assign dl_load = host_we && host_addr[15:12] == 4'h1 && host_addr[3:0] == 4'd0;

  always_comb begin
    step   = (state == S_DRAW_U) || (state == S_DRAW_I);
    a_req  = (state == S_DRAW_I);
    dl_adv = (state == S_CMP);
    x_pop  = (state == S_CMP) && enable && ext_mode && x_valid;
    if (!enable)       dl_in = '0;
    else if (ext_mode) dl_in = x_valid ? cell_t'(x_word[CELL_W-1:0]) : '0;
    else if (oo_mode)  dl_in = oo_cell;
    else if (mk_mode)  dl_in = mk_cell;
    else               dl_in = cell_t'(a_val);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      u_r       <= '0;
      done      <= 1'b0;
      cell_out  <= '0;
      enable    <= 1'b0;
      ext_mode  <= 1'b0;
      oo_mode   <= 1'b0;
      mk_mode   <= 1'b0;
      oo_vci    <= '0;
      gen_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (cell_start) state <= S_DRAW_U;
        S_DRAW_U: begin u_r <= rnd; state <= S_DRAW_I; end
        S_DRAW_I: state <= S_READ;
        S_READ:   state <= S_CMP;
        S_CMP:    state <= S_OUT;        // a_valid is high here; cell enters the delay line
        S_OUT: begin
          cell_out <= dl_out;
          if (dl_out.valid) gen_count <= gen_count + 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default:  state <= S_IDLE;
      endcase
      if (host_we && host_addr[15:12] == 4'h1 && host_addr[3:0] == 4'd1) begin
        enable   <= host_wdata[0];
        ext_mode <= host_wdata[1];
        oo_mode  <= host_wdata[2];
        mk_mode  <= host_wdata[3];
      end
      if (host_we && host_addr[15:12] == 4'h1 && host_addr[3:0] == 4'd2)
        oo_vci <= host_wdata[VCI_W-1:0];
    end
  end

  always_comb begin
    unique case (host_addr[15:12])
      4'h0:    host_rdata = {16'h0, a_rdata};
      4'h1:    host_rdata = (host_addr[3:0] == 4'd2) ? 32'(oo_vci)
                                                   : {23'h0, mk_state, oo_on, mk_mode, oo_mode, ext_mode, enable};
      4'h3:    host_rdata = {16'h0, oo_rdata};
      4'h4:    host_rdata = {16'h0, mk_rdata};
      4'h2:    case (host_addr[1:0])
                 2'd0:    host_rdata = gen_count;
                 2'd1:    host_rdata = 32'(x_level);
                 2'd2:    host_rdata = 32'(x_overflow);
                 default: host_rdata = '0;
               endcase
      default: host_rdata = '0;
    endcase
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_CMP) |-> a_valid)
    else $error("traffic_generator: alias result not ready in compare step");
  assert property (@(posedge clk) disable iff (!rst_n) (state != S_IDLE) |-> !cell_start)
    else $error("traffic_generator: cell_start while busy");
  assert property (@(posedge clk) disable iff (!rst_n) oo_tick |-> !oo_busy)
    else $error("traffic_generator: ON-OFF draw still running at cell start");
  assert property (@(posedge clk) disable iff (!rst_n) mk_tick |-> !mk_busy)
    else $error("traffic_generator: Markov draw still running at cell start");
`endif

endmodule
