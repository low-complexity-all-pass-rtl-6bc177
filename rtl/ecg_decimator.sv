// ecg_decimator: 128:1 decimation filter for a 1-bit sigma-delta ECG
// front end, 51.2 kHz in, 400 Hz out.
//
//   in_bit -> slink 4th order 32:1 -> halfband 2:1 -> halfband 2:1
//          -> compensation 1:1 -> out_data
//            51.2 kHz        1600 Hz        800 Hz        400 Hz     400 Hz
//
// The slink removes most of the quantisation noise cheaply and drops the rate
// to 1600 Hz; each 10th-order double polyphase all-pass halfband stage halves
// the rate with a steep, almost flat lowpass; the first-order compensation
// filter lifts the upper passband back to counter the slink droop. No stage
// uses a multiplier: every coefficient is a hard-wired shift-and-add.
//
// Interface: in_valid qualifies in_bit (tie it high when clk is the 51.2 kHz
// modulator clock). out_valid pulses once per 128 accepted input bits, four
// clock cycles after the 128th of them (one register per stage), with
// out_data in two's complement, DATA_FRAC fraction bits (full scale of the
// modulator = +/-1.0). The slink output and the two halfband outputs are
// brought out for monitoring.
// Reset: asynchronous, active low, for the whole chain.
//
// The stages, their orders, ratios and rates follow the published design;
// word lengths, coefficient values, the valid-strobe interface and reset are
// this design's choices (see ecg_dec_pkg).
module ecg_decimator
  import ecg_dec_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_bit,
  output logic                       out_valid,
  output logic signed [DATA_W-1:0]   out_data,
  output logic                       slink_valid,
  output logic signed [SLINK_W-1:0]  slink_data,
  output logic                       hb1_valid,
  output logic signed [DATA_W-1:0]   hb1_data,
  output logic                       hb2_valid,
  output logic signed [DATA_W-1:0]   hb2_data
);

  logic signed [DATA_W-1:0] slink_ext;

  slink_decimator #(.ORDER(SLINK_ORDER), .R(SLINK_R), .OUT_W(SLINK_W)) u_slink (
    .clk, .rst_n, .in_valid, .in_bit,
    .out_valid(slink_valid), .out_data(slink_data)
  );

  // align the slink code (SLINK_FRAC fraction bits) to the filter format
  assign slink_ext = DATA_W'(slink_data) <<< (DATA_FRAC - SLINK_FRAC);

  polyphase_hb_decimator #(.W(DATA_W)) u_hb1 (
    .clk, .rst_n, .in_valid(slink_valid), .in_data(slink_ext),
    .out_valid(hb1_valid), .out_data(hb1_data)
  );

  polyphase_hb_decimator #(.W(DATA_W)) u_hb2 (
    .clk, .rst_n, .in_valid(hb1_valid), .in_data(hb1_data),
    .out_valid(hb2_valid), .out_data(hb2_data)
  );

  compensation_filter #(.W(DATA_W)) u_comp (
    .clk, .rst_n, .in_valid(hb2_valid), .in_data(hb2_data),
    .out_valid, .out_data
  );

endmodule
