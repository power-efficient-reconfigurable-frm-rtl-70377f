// frm_filter_bank: reconfigurable frequency-response-masking (FRM) filter for
// a hearing-aid filter bank, built from distributed-arithmetic processing
// units whose adders are Brent-Kung parallel prefix adders.
//
//   Y(z) = H(z^M) H_M(z) + Hc(z^M) H_CM(z),   Hc(z^M) = z^(-M(N-1)/2) - H(z^M)
//
// H(z) is the 45-tap linear-phase low-pass model filter (frm_pkg::H_HALF).
// Interpolating it by M makes its transition band M times narrower; the
// complementary branch is the delayed input minus the periodic model filter
// output, and the two masking filters keep the wanted pass bands of each
// branch. Three da_pu instances do the filtering:
//   u_model  H(z^M): 45 taps spaced M samples apart, power-up RAM = model taps;
//   u_mask   H_M(z):  MASK_TAPS taps, power-up RAM = unit impulse;
//   u_cmask  H_CM(z): MASK_TAPS taps, power-up RAM = zero.
// So at power-up the output is the periodic model filter alone; loading
// masking coefficients (lut_* port) makes it a full FRM response. reset does
// not restore the RAM contents.
//
// Number formats: samples are DATA_W_P-bit two's complement integers,
// coefficients have COEF_FRAC fraction bits. The model filter output and the
// complementary signal (out_center * 2^COEF_FRAC - model output) are rounded
// (half up) and saturated to DATA_W_P bits before masking; the sum of the two
// masking filters is rounded and saturated to Y_n the same way.
//
// Reconfiguration: every coefficient RAM has two banks. ctrl selects the bank
// a new input sample is filtered with; the sample keeps that bank through all
// three units. The lut_* port writes one RAM word (a pre-computed sum of up to
// four coefficients, see dram_ppg) of the unit chosen by lut_filter, in either
// bank, at any time; writing the bank not in use changes nothing in flight.
//
// Timing: X is taken when x_valid and x_ready are high; x_ready is low for
// the DATA_W_P/PES+1 cycles after that. y_valid pulses 2*(DATA_W_P/PES+2)+2 = 10
// clock edges after the accepting edge, with Y_n. One sample per
// DATA_W_P/PES+2 = 4 cycles at most. Assertions check the hand-over between
// the units and the lut_filter code. reset is synchronous, active high.
//
// The FRM structure, the model filter taps, the 8-bit X and Y_n and the four
// processing elements per unit follow the filter design; M = 4, the masking
// filter length and power-up contents, the use of ctrl as bank select, the write
// port and the handshake are this design's choices.
module frm_filter_bank
  import frm_pkg::*;
#(
  parameter int unsigned DATA_W_P   = DATA_W,
  parameter int unsigned MODEL_N    = MODEL_TAPS,
  parameter int unsigned M          = 4,
  parameter int unsigned MASK_TAPS  = 16,
  parameter int unsigned PES        = 4,
  parameter ppa_kind_e   KIND       = PPA_BK,
  localparam int unsigned LUT_W     = COEF_W + 2
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    x_valid,
  output logic                    x_ready,
  input  logic [DATA_W_P-1:0]     X,
  input  logic                    ctrl,
  input  logic                    lut_we,
  input  filter_sel_e             lut_filter,
  input  logic                    lut_bank,
  input  logic [3:0]              lut_group,
  input  logic [LUT_K-1:0]        lut_addr,
  input  logic signed [LUT_W-1:0] lut_data,
  output logic                    y_valid,
  output logic [DATA_W_P-1:0]     Y_n
);

  localparam int unsigned MODEL_ACC_W = LUT_W + $clog2((MODEL_N + LUT_K - 1) / LUT_K) + DATA_W_P + 1;
  localparam int unsigned MASK_ACC_W  = LUT_W + $clog2((MASK_TAPS + LUT_K - 1) / LUT_K) + DATA_W_P + 1;
  localparam int unsigned WIDE_W      = 40;

  // Round half up by COEF_FRAC bits and saturate to DATA_W_P bits.
  function automatic logic [DATA_W_P-1:0] round_sat(logic signed [WIDE_W-1:0] v);
    logic signed [WIDE_W-1:0] r;
    localparam logic signed [WIDE_W-1:0] MAXV = (WIDE_W'(1) <<< (DATA_W_P - 1)) - 1;
    r = (v + (WIDE_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > MAXV)       return DATA_W_P'(MAXV);
    else if (r < -MAXV - 1) return DATA_W_P'(-MAXV - 1);
    else                return DATA_W_P'(r);
  endfunction

  // ---- periodic model filter H(z^M) --------------------------------------
  logic                          mdl_valid, mdl_bank;
  logic signed [MODEL_ACC_W-1:0] mdl_data;
  logic [DATA_W_P-1:0]           mdl_center;

  da_pu #(
    .TAPS(MODEL_N), .SPACING(M), .IN_W(DATA_W_P), .PES(PES), .K(LUT_K),
    .LUT_W(LUT_W), .INIT(INIT_MODEL), .KIND(KIND)
  ) u_model (
    .clk, .rst(reset),
    .in_valid(x_valid), .in_ready(x_ready), .in_data(X), .in_bank(ctrl),
    .wr_en(lut_we && lut_filter == SEL_MODEL), .wr_bank(lut_bank), .wr_group(lut_group),
    .wr_addr(lut_addr), .wr_data(lut_data),
    .out_valid(mdl_valid), .out_data(mdl_data), .out_center(mdl_center), .out_bank(mdl_bank)
  );

  // ---- branch signals: model output and its complement -------------------
  logic signed [WIDE_W-1:0] mdl_wide, cmp_wide;
  logic [DATA_W_P-1:0]      br_model, br_comp;

  always_comb begin
    mdl_wide = WIDE_W'(mdl_data);
    cmp_wide = (WIDE_W'(signed'(mdl_center)) <<< COEF_FRAC) - mdl_wide;
    br_model = round_sat(mdl_wide);
    br_comp  = round_sat(cmp_wide);
  end

  // ---- masking filters H_M(z) and H_CM(z) --------------------------------
  logic                         msk_valid, cmk_valid, msk_ready, cmk_ready;
  logic signed [MASK_ACC_W-1:0] msk_data, cmk_data;
  logic [DATA_W_P-1:0]          msk_center_unused, cmk_center_unused;
  logic                         msk_bank_unused, cmk_bank_unused;

  da_pu #(
    .TAPS(MASK_TAPS), .SPACING(1), .IN_W(DATA_W_P), .PES(PES), .K(LUT_K),
    .LUT_W(LUT_W), .INIT(INIT_IMPULSE), .KIND(KIND)
  ) u_mask (
    .clk, .rst(reset),
    .in_valid(mdl_valid), .in_ready(msk_ready), .in_data(br_model), .in_bank(mdl_bank),
    .wr_en(lut_we && lut_filter == SEL_MASK), .wr_bank(lut_bank), .wr_group(lut_group),
    .wr_addr(lut_addr), .wr_data(lut_data),
    .out_valid(msk_valid), .out_data(msk_data), .out_center(msk_center_unused),
    .out_bank(msk_bank_unused)
  );

  da_pu #(
    .TAPS(MASK_TAPS), .SPACING(1), .IN_W(DATA_W_P), .PES(PES), .K(LUT_K),
    .LUT_W(LUT_W), .INIT(INIT_ZERO), .KIND(KIND)
  ) u_cmask (
    .clk, .rst(reset),
    .in_valid(mdl_valid), .in_ready(cmk_ready), .in_data(br_comp), .in_bank(mdl_bank),
    .wr_en(lut_we && lut_filter == SEL_CMASK), .wr_bank(lut_bank), .wr_group(lut_group),
    .wr_addr(lut_addr), .wr_data(lut_data),
    .out_valid(cmk_valid), .out_data(cmk_data), .out_center(cmk_center_unused),
    .out_bank(cmk_bank_unused)
  );

  // ---- output adder -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (reset) begin
      y_valid <= 1'b0;
      Y_n   <= '0;
    end else begin
      y_valid <= msk_valid;
      if (msk_valid) Y_n <= round_sat(WIDE_W'(msk_data) + WIDE_W'(cmk_data));
    end
  end

  // The masking units run as fast as the model unit, so they are always free
  // when a model output arrives, and the two finish together.
  a_mask_free: assert property (@(posedge clk) disable iff (reset)
                                mdl_valid |-> (msk_ready && cmk_ready));
  a_lut_target: assert property (@(posedge clk) disable iff (reset)
                                lut_we |-> lut_filter inside {SEL_MODEL, SEL_MASK, SEL_CMASK});
  a_mask_sync: assert property (@(posedge clk) disable iff (reset) msk_valid == cmk_valid);

endmodule
