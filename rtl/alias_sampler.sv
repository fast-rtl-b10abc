// alias_sampler: discrete random variate generator using the alias method.
//
// Two tables of 2^IDX_W 16-bit words sit in the module's local memory: the cutoff
// values F and the aliases L. Given a uniform index I and a uniform fraction U
// (16 bits read as U/65536), the result is I when U <= F[I] and L[I] otherwise, so
// F[I]/65536 is the probability of keeping I rather than its alias. The host computes
// the tables (any of the usual table-building algorithms) and writes them while the
// simulation is stopped.
//
// Timing: two-stage pipeline. `req` with `u`,`idx` in cycle 0; the tables are read into
// registers at the end of cycle 0, the compare result is registered at the end of
// cycle 1, and `val_valid`/`val` are high/stable in cycle 2.
// Host port: addr[IDX_W] = 0 selects F, 1 selects L; addr[IDX_W-1:0] is the entry.
// The table size (IDX_W = 9, one entry per 9-bit cell code) is this design's choice.
module alias_sampler #(
  parameter int unsigned IDX_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [15:0]      u,
  input  logic [IDX_W-1:0] idx,
  output logic             val_valid,
  output logic [IDX_W-1:0] val,
  // host access to the tables
  input  logic             host_we,
  input  logic [IDX_W:0]   host_addr,
  input  logic [15:0]      host_wdata,
  output logic [15:0]      host_rdata
);
  localparam int unsigned N = 1 << IDX_W;

  logic [15:0] cutoff_mem [N];
  logic [15:0] alias_mem  [N];

  always_ff @(posedge clk) begin
    if (host_we && !host_addr[IDX_W]) cutoff_mem[host_addr[IDX_W-1:0]] <= host_wdata;
    if (host_we &&  host_addr[IDX_W]) alias_mem [host_addr[IDX_W-1:0]] <= host_wdata;
  end

  assign host_rdata = host_addr[IDX_W] ? alias_mem[host_addr[IDX_W-1:0]]
                                       : cutoff_mem[host_addr[IDX_W-1:0]];

  // stage 1: table read
  logic             s1_v;
  logic [15:0]      s1_u, s1_f, s1_l;
  logic [IDX_W-1:0] s1_i;

  always_ff @(posedge clk) begin
    s1_u <= u;
    s1_i <= idx;
    s1_f <= cutoff_mem[idx];
    s1_l <= alias_mem[idx];
  end

  // stage 2: compare and choose
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      val_valid <= 1'b0;
      val       <= '0;
    end else begin
      s1_v      <= req;
      val_valid <= s1_v;
      if (s1_v) val <= (s1_u <= s1_f) ? s1_i : s1_l[IDX_W-1:0];
    end
  end

endmodule
