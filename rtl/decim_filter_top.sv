// decim_filter_top: low-power decimation filter for a sigma-delta ADC (ECG
// band, 0.05 - 150 Hz) whose additions all use variable-latency adders.
//
//   sd_bit @ 19.2 kHz -> CIC (N=3, R=16, M=1) -> 1.2 kHz
//                     -> half-band 1 (11 taps, /2) -> 600 Hz
//                     -> half-band 2 (45 taps, /2) -> 300 Hz -> out_data
//
// The stage order, rates, CIC order and the 45-tap second half-band filter
// follow the source description; the 64 : 1 overall ratio means one output
// word per 64 input bits.  Each stage owns one 64-bit VL carry-select adder
// and schedules its additions on it; an addition whose carry chain may be
// long is given a second clock cycle, so a stage's work per sample varies
// by a few cycles.  The stages are joined by valid/ready handshakes, so a busy
// stage holds back the one before it.  64 input bits cost at most 685 system
// clocks, so the system clock must run at least about 11 times the input bit
// rate (250 kHz for 19.2 kHz); in_ready paces the input at any faster clock.
//
// The modulator bit is taken as +1 (sd_bit = 1) or -1 (sd_bit = 0), a 2-bit
// signed CIC input; the 14-bit CIC output is sign-extended to the 16-bit
// half-band data path.  These widths are this design's choices.
// th_adj is the ageing (NBTI) threshold adjust of every carry length
// detector; the source keeps it low.  vl_stall[k] is high in each cycle the
// adder of stage k (0 = CIC, 1 = HB1, 2 = HB2) is stretched.
module decim_filter_top
  import decim_pkg::*;
#(
  parameter int unsigned CIC_N  = 3,
  parameter int unsigned CIC_R  = 16,
  parameter int unsigned CIC_M  = 1,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     th_adj,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     sd_bit,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_data,
  output logic [2:0]               vl_stall
);

  localparam int unsigned CIC_IN_W  = 2;
  localparam int unsigned CIC_OUT_W = CIC_IN_W + CIC_N * $clog2(CIC_R * CIC_M);

  logic signed [CIC_IN_W-1:0]  cic_in;
  logic                        cic_valid, cic_ready;
  logic signed [CIC_OUT_W-1:0] cic_data;
  logic                        hb1_valid, hb1_ready;
  logic signed [DATA_W-1:0]    hb1_data;

  assign cic_in = sd_bit ? CIC_IN_W'(1) : {CIC_IN_W{1'b1}};

  cic_decimator #(
    .IN_W (CIC_IN_W),
    .N    (CIC_N),
    .R    (CIC_R),
    .M    (CIC_M)
  ) u_cic (
    .clk       (clk),
    .rst_n     (rst_n),
    .th_adj    (th_adj),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (cic_in),
    .out_valid (cic_valid),
    .out_ready (cic_ready),
    .out_data  (cic_data),
    .vl_stall  (vl_stall[0])
  );

  hb_decimator #(
    .TAPS   (HB1_TAPS),
    .COEF   (HB1_COEF),
    .DATA_W (DATA_W)
  ) u_hb1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .th_adj    (th_adj),
    .in_valid  (cic_valid),
    .in_ready  (cic_ready),
    .in_data   (DATA_W'(cic_data)),
    .out_valid (hb1_valid),
    .out_ready (hb1_ready),
    .out_data  (hb1_data),
    .vl_stall  (vl_stall[1])
  );

  hb_decimator #(
    .TAPS   (HB2_TAPS),
    .COEF   (HB2_COEF),
    .DATA_W (DATA_W)
  ) u_hb2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .th_adj    (th_adj),
    .in_valid  (hb1_valid),
    .in_ready  (hb1_ready),
    .in_data   (hb1_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .vl_stall  (vl_stall[2])
  );

endmodule
