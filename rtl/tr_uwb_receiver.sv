// Digital back-end of a transmitted-reference UWB receiver, in its two
// implementations side by side.
//
// Both receivers take the same NAD-sample-per-clock input from the interleaved
// A/D bank, acquire symbol timing with the sliding-correlation synchronizer,
// find the block start from a training pattern and demodulate blocks of NR
// reference and ND data pulses with early-late tracking:
//   seq_*  minimum-area sequential receiver (tr_receiver_seq): one multiplier,
//          adder and subtractor for synchronization, a template adder and three
//          MACs for demodulation; one bit per data pulse.
//   par_*  high-throughput parallel receiver (tr_receiver_par): all correlation
//          values at once with a comparator tree, and whole blocks demodulated
//          in one clock; ND bits per block.
// The two are independent; either can be used alone. Sizes default to the
// document's example (NF=1000 samples per frame, NW=100 per pulse, NP=3
// correlated frames, 4-bit A/D, NAD=10 converters).
module tr_uwb_receiver
  import tr_pkg::*;
#(
  parameter int unsigned NF          = 1000,
  parameter int unsigned NW          = 100,
  parameter int unsigned NP          = 3,
  parameter int unsigned NR          = 2,
  parameter int unsigned ND          = 8,
  parameter int unsigned NAD         = 10,
  parameter int unsigned NBITS       = 4,
  parameter int unsigned AIN_W       = 12,
  parameter map_e        MAPPING     = MAP_SIGN_MAG,
  parameter logic [NR-1:0] REF_PATTERN = '1,
  parameter int unsigned TRAIN_LEN   = 8,
  parameter logic [TRAIN_LEN-1:0] TRAIN = 8'b0010_1101,
  parameter int unsigned KW          = $clog2(NF),
  parameter int unsigned SVW         = 2 * (NBITS + 1) + $clog2(NW) + 1 + $clog2(NP) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ain_valid,
  input  logic signed [AIN_W-1:0] ain [NAD],
  input  logic [SVW-1:0]          threshold,
  // sequential receiver
  output logic                    seq_bit_valid,
  output logic                    seq_bit,
  output logic [2:0]              seq_state,
  output logic                    seq_acq_done,
  output logic                    seq_acq_reject,
  output logic [KW-1:0]           seq_acq_kmax,
  output logic [SVW-1:0]          seq_acq_smax,
  output logic [31:0]             seq_acq_start,
  output logic                    seq_block_found,
  output logic                    seq_tmpl_step,
  output logic                    seq_track_valid,
  output logic signed [1:0]       seq_track_dir,
  output logic                    seq_track_applied,
  output logic signed [1:0]       seq_track_applied_dir,
  output logic                    seq_overrun,
  // parallel receiver
  output logic                    par_bits_valid,
  output logic [ND-1:0]           par_bits,
  output logic [2:0]              par_state,
  output logic                    par_acq_done,
  output logic                    par_acq_reject,
  output logic [KW-1:0]           par_acq_kmax,
  output logic [SVW-1:0]          par_acq_smax,
  output logic [31:0]             par_acq_start,
  output logic                    par_block_found,
  output logic                    par_track_applied,
  output logic signed [1:0]       par_track_applied_dir
);

  tr_receiver_seq #(.NF(NF), .NW(NW), .NP(NP), .NR(NR), .ND(ND), .NAD(NAD), .NBITS(NBITS),
                    .AIN_W(AIN_W), .MAPPING(MAPPING), .REF_PATTERN(REF_PATTERN),
                    .TRAIN_LEN(TRAIN_LEN), .TRAIN(TRAIN), .KW(KW), .SVW(SVW)) u_seq (
    .clk, .rst_n, .ain_valid, .ain, .threshold,
    .bit_valid(seq_bit_valid), .bit_out(seq_bit), .state_o(seq_state),
    .acq_done(seq_acq_done), .acq_reject(seq_acq_reject), .acq_kmax(seq_acq_kmax),
    .acq_smax(seq_acq_smax), .acq_start(seq_acq_start), .block_found(seq_block_found),
    .tmpl_step(seq_tmpl_step), .track_valid(seq_track_valid), .track_dir(seq_track_dir),
    .track_applied(seq_track_applied), .track_applied_dir(seq_track_applied_dir),
    .overrun(seq_overrun));

  tr_receiver_par #(.NF(NF), .NW(NW), .NP(NP), .NR(NR), .ND(ND), .NAD(NAD), .NBITS(NBITS),
                    .AIN_W(AIN_W), .MAPPING(MAPPING), .REF_PATTERN(REF_PATTERN),
                    .TRAIN_LEN(TRAIN_LEN), .TRAIN(TRAIN), .KW(KW), .SVW(SVW)) u_par (
    .clk, .rst_n, .ain_valid, .ain, .threshold,
    .bits_valid(par_bits_valid), .bits(par_bits), .state_o(par_state),
    .acq_done(par_acq_done), .acq_reject(par_acq_reject), .acq_kmax(par_acq_kmax),
    .acq_smax(par_acq_smax), .acq_start(par_acq_start), .block_found(par_block_found),
    .track_applied(par_track_applied), .track_applied_dir(par_track_applied_dir));

endmodule
