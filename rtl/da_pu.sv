// da_pu: processing unit - a distributed-arithmetic (DA) FIR filter.
//
//   y[n] = sum_{t=0}^{TAPS-1} h(t) * x[n - t*SPACING]
//
// SPACING = 1 gives an ordinary FIR filter; SPACING = M gives the periodic
// (interpolated) filter H(z^M) with M-1 zero taps between coefficients.
//
// How it works. The delay line holds (TAPS-1)*SPACING+1 samples of IN_W
// bits. The sample word is cut into PES bit slices of BPP = IN_W/PES bits;
// each slice has its own processing element: a DRAM partial product
// generator (dram_ppg) and a shift accumulator (shift_acc). In bit-serial
// step j (0..BPP-1) the element of slice s addresses its coefficient RAMs
// with bit s*BPP+j of every tap and accumulates the partial product with
// weight 2^j; the top bit of the top slice is the sign and is subtracted.
// The slice sums are then added with weights 2^(s*BPP).
//
// Interface and timing. A sample is taken on a cycle with in_valid and
// in_ready both high, together with in_bank, the coefficient bank used for
// that whole sample. in_ready then stays low and out_valid pulses high
// BPP+2 clock edges after the accepting edge, with the full-precision result
// out_data (coefficient fraction bits included), out_center (the delay-line
// sample at tap (TAPS-1)/2, the delay of a linear-phase filter) and
// out_bank. in_ready is high again in that same cycle, so one sample is taken
// every BPP+2 cycles at most. The wr_* port writes one RAM word of every
// processing element (all elements hold the same contents).
//
// The PE structure (DRAM PPG, prefix adder tree, shift accumulator, slices
// joined by shifts and adds) follows the filter's processing unit; the
// slicing into IN_W/PES bits per element, the handshake and the timing are
// this design's choices.
module da_pu
  import frm_pkg::*;
#(
  parameter int unsigned TAPS    = MODEL_TAPS,
  parameter int unsigned SPACING = 1,
  parameter int unsigned IN_W    = DATA_W,
  parameter int unsigned PES     = 4,
  parameter int unsigned K       = LUT_K,
  parameter int unsigned LUT_W   = COEF_W + 2,
  parameter lut_init_e   INIT    = INIT_MODEL,
  parameter ppa_kind_e   KIND    = PPA_BK,
  localparam int unsigned GROUPS = (TAPS + K - 1) / K,
  localparam int unsigned PP_W   = LUT_W + $clog2(GROUPS),
  localparam int unsigned ACC_W  = PP_W + IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         in_data,
  input  logic                    in_bank,
  input  logic                    wr_en,
  input  logic                    wr_bank,
  input  logic [3:0]              wr_group,
  input  logic [K-1:0]            wr_addr,
  input  logic signed [LUT_W-1:0] wr_data,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  output logic [IN_W-1:0]         out_center,
  output logic                    out_bank
);

  localparam int unsigned BPP    = IN_W / PES;
  localparam int unsigned SH_W   = (BPP > 1) ? $clog2(BPP) : 1;
  localparam int unsigned SL_W   = PP_W + BPP + 1;
  localparam int unsigned DL_LEN = (TAPS - 1) * SPACING + 1;
  localparam int unsigned CENTER = ((TAPS - 1) / 2) * SPACING;
  localparam int unsigned CNT_W  = $clog2(BPP + 2);

  logic [IN_W-1:0]  dl [DL_LEN];
  logic             running, bank_q;
  logic [CNT_W-1:0] cnt;
  logic             accept, rd_en, acc_en, acc_first;
  logic [SH_W-1:0]  rd_j, acc_j;
  logic signed [ACC_W-1:0] combined;

  assign in_ready  = !running;
  assign accept    = in_valid && in_ready;
  assign rd_en     = running && (32'(cnt) < BPP);
  assign acc_en    = running && (cnt != '0) && (32'(cnt) <= BPP);
  assign acc_first = (cnt == CNT_W'(1));
  assign rd_j      = SH_W'(cnt);
  assign acc_j     = SH_W'(cnt - CNT_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DL_LEN); i++) dl[i] <= '0;
      running    <= 1'b0;
      cnt        <= '0;
      bank_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_center <= '0;
      out_bank   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        dl[0] <= in_data;
        for (int i = 1; i < int'(DL_LEN); i++) dl[i] <= dl[i-1];
        bank_q  <= in_bank;
        running <= 1'b1;
        cnt     <= '0;
      end else if (running) begin
        if (32'(cnt) == BPP + 1) begin
          running    <= 1'b0;
          out_valid  <= 1'b1;
          out_data   <= combined;
          out_center <= dl[CENTER];
          out_bank   <= bank_q;
        end else begin
          cnt <= cnt + CNT_W'(1);
        end
      end
    end
  end

  logic signed [SL_W-1:0] slice_acc [PES];

  for (genvar s = 0; s < int'(PES); s++) begin : g_pe
    logic [GROUPS*K-1:0]    addr_bits;
    logic signed [PP_W-1:0] pp;

    always_comb begin
      addr_bits = '0;
      for (int t = 0; t < int'(TAPS); t++)
        addr_bits[t] = dl[t * SPACING][s * BPP + 32'(rd_j)];
    end

    dram_ppg #(
      .GROUPS(GROUPS), .K(K), .LUT_W(LUT_W), .TAPS(TAPS), .INIT(INIT), .KIND(KIND)
    ) u_ppg (
      .clk, .rst, .rd_en, .rd_bank(bank_q), .addr_bits,
      .wr_en, .wr_bank, .wr_group, .wr_addr, .wr_data, .pp
    );

    shift_acc #(.IN_W(PP_W), .SH_W(SH_W), .ACC_W(SL_W)) u_acc (
      .clk, .rst, .en(acc_en), .first(acc_first),
      .neg((s == int'(PES) - 1) && (32'(acc_j) == BPP - 1)),
      .shift(acc_j), .pp, .acc(slice_acc[s])
    );
  end

  // The sequencer never passes its last step, and a result is a one-cycle pulse.
  a_cnt_range: assert property (@(posedge clk) disable iff (rst) running |-> 32'(cnt) <= BPP + 1);
  a_out_pulse: assert property (@(posedge clk) disable iff (rst) out_valid |=> !out_valid);

  always_comb begin
    combined = '0;
    for (int s = 0; s < int'(PES); s++)
      combined += ACC_W'(slice_acc[s]) <<< (s * BPP);
  end

endmodule
