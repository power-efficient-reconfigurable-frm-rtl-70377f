// dram_ppg: distributed-RAM partial product generator of a distributed-
// arithmetic FIR filter.
//
// The filter's taps are split into GROUPS groups of K taps. For each group a
// 2^K-word RAM holds every possible sum of that group's coefficients: word a
// is the sum of the coefficients of the taps j with a[j] = 1. In one cycle the
// generator takes one bit of every tap's sample (addr_bits, tap g*K+j at bit
// g*K+j), reads one word per group and sums the GROUPS words with a tree of
// parallel prefix adders. The result pp is sum_t h(t) * bit(t): the partial
// product of one bit plane, which a shift accumulator weighs and adds up.
//
// The RAM words are read into registers (one cycle: pp belongs to the
// addr_bits presented in the previous cycle with rd_en high). There are two
// banks; rd_bank picks the bank of a read, so one bank can be rewritten
// (wr_en, synchronous) while the filter runs on the other. Like FPGA
// distributed RAM, the RAM gets its initial contents at configuration (power
// up), computed from INIT: the model filter taps, a unit impulse, or zero.
// Reset clears the output registers only; it does not undo RAM writes. The
// RAM is therefore a written variable with an initial value, which lint tools
// point out (PROCASSINIT); that is the intended distributed-RAM behaviour.
//
// The RAM-per-group organisation, the registered RAM outputs and the prefix
// adder tree follow the filter's processing unit; K = 4, the word widths, the
// two banks and the reset contents are this design's choices.
module dram_ppg
  import frm_pkg::*;
#(
  parameter int unsigned GROUPS = 12,
  parameter int unsigned K      = LUT_K,
  parameter int unsigned LUT_W  = COEF_W + 2,
  parameter int unsigned TAPS   = MODEL_TAPS,  // taps beyond TAPS read as zero at reset
  parameter lut_init_e   INIT   = INIT_MODEL,
  parameter ppa_kind_e   KIND   = PPA_BK,
  localparam int unsigned PP_W  = LUT_W + $clog2(GROUPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    rd_en,
  input  logic                    rd_bank,
  input  logic [GROUPS*K-1:0]     addr_bits,
  input  logic                    wr_en,
  input  logic                    wr_bank,
  input  logic [3:0]              wr_group,
  input  logic [K-1:0]            wr_addr,
  input  logic signed [LUT_W-1:0] wr_data,
  output logic signed [PP_W-1:0]  pp
);

  localparam int unsigned GI_W = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  typedef logic signed [LUT_W-1:0] ram_t [2][GROUPS][2**K];

  // Configuration-time contents of both banks.
  function automatic ram_t ram_init();
    ram_t r;
    for (int bk = 0; bk < 2; bk++)
      for (int g = 0; g < int'(GROUPS); g++)
        for (int a = 0; a < 2**K; a++)
          r[bk][g][a] = LUT_W'(lut_init_value(INIT, g, a, int'(K), int'(TAPS)));
    return r;
  endfunction

  ram_t mem = ram_init();
  logic signed [LUT_W-1:0] rd_q [GROUPS];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_group) < GROUPS) mem[wr_bank][wr_group[GI_W-1:0]][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int g = 0; g < int'(GROUPS); g++) rd_q[g] <= '0;
    end else if (rd_en) begin
      for (int g = 0; g < int'(GROUPS); g++) rd_q[g] <= mem[rd_bank][g][addr_bits[g*K +: K]];
    end
  end

  ppa_tree #(.N(GROUPS), .W(LUT_W), .KIND(KIND)) u_tree (.in(rd_q), .sum(pp));

endmodule
