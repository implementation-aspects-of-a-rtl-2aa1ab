// End-to-end test of both receivers (sequential and parallel) at the default sizes
// (NF=1000, NW=100, NP=3, NR=2, ND=8, NAD=10, 4-bit sign-magnitude A/D).
//
// The testbench synthesises the received signal itself: a fixed multipath
// pulse (sparse rays of random sign, amplitude decaying over NW samples) at
// offset OFF in every frame, small uniform noise, and this frame plan:
//   noise only  -> the first acquisition must be rejected by the threshold
//   preamble of +1 pulses  -> second acquisition, differential mode
//   8 training frames whose sign changes spell TRAIN, one guard frame
//   NB blocks of NR reference (+1) and ND random data pulses.
// Partway through the blocks the pulse position moves one sample late and
// later back again, which the early-late tracking has to follow.
// Both receivers get the same input. Checks for each: acquired phase, every
// data bit, the output rate (one bit every NF/NAD clocks within a block for
// the sequential one, one block every (NR+ND)NF/NAD clocks for the parallel
// one), and that every mechanism (rejection, acquisition, block lock, template,
// late and early adjustment) occurred in each.
module tb_tr_uwb_receiver;
  import tr_pkg::*;

  localparam int NF = 1000, NW = 100, NP = 3, NR = 2, ND = 8, NAD = 10;
  localparam int TRAIN_LEN = 8;
  localparam logic [7:0] TRAIN = 8'b0010_1101;
  localparam int OFF = 337;
  localparam int NB = 6;
  localparam int T0 = 100;                    // first training frame
  localparam int LASTT = T0 + TRAIN_LEN - 1;  // last training frame
  localparam int B0 = LASTT + 2;              // first block frame
  localparam int NFRAMES = B0 + NB * (NR + ND) + 3;
  localparam int SHIFT_ON = B0 + 25, SHIFT_OFF = B0 + 45;
  localparam int SVW = 2 * 5 + $clog2(NW) + 1 + $clog2(NP) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 ain_valid;
  logic signed [11:0]   ain [NAD];
  logic [SVW-1:0]       threshold;
  logic seq_bit_valid, seq_bit, seq_acq_done, seq_acq_reject, seq_block_found, seq_tmpl_step;
  logic seq_track_valid, seq_track_applied, seq_overrun;
  logic [2:0] seq_state, par_state;
  logic [$clog2(NF)-1:0] seq_acq_kmax, par_acq_kmax;
  logic [SVW-1:0] seq_acq_smax, par_acq_smax;
  logic [31:0] seq_acq_start, par_acq_start;
  logic signed [1:0] seq_track_dir, seq_track_applied_dir, par_track_applied_dir;
  logic par_bits_valid, par_acq_done, par_acq_reject, par_block_found, par_track_applied;
  logic [ND-1:0] par_bits;

  tr_uwb_receiver dut (.*);

  int h [NW];
  int sgn [NFRAMES];
  int shift_of [NFRAMES];
  bit data [NB*ND];
  int checks = 0, failures = 0;

  // independent quantizer model (mapping 2, 15 levels over [-0.5, 0.5])
  function automatic int q2(int x);
    real step = 2048.0 / 15.0;
    int m;
    m = int'($floor((x < 0 ? -x : x) / step + 0.5));
    if (m > 7) m = 7;
    return x < 0 ? -m : m;
  endfunction

  function automatic int sample_at(int n);
    int f, t;
    f = n / NF;
    if (f >= NFRAMES) return 0;
    t = n - f * NF - OFF - shift_of[f];
    if (t < 0 || t >= NW || sgn[f] == 0) return 0;
    return sgn[f] * h[t];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int energy;
  int nrej = 0, nacq = 0, nfound = 0, nlate = 0, nearly = 0, ntmpl = 0, nbits = 0;
  int prej = 0, pacq = 0, pfound = 0, plate = 0, pearly = 0, pbits = 0, pblk_prev = -1;
  int bit_cycle_prev = -1, cycle = 0;
  int within_block = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    // pulse shape
    for (int t = 0; t < NW; t++) begin
      int a;
      a = 150 + (850 * (NW - t)) / NW;
      h[t] = (t == 0 || $urandom_range(0, 3) == 0) ? (($urandom_range(0, 1) == 1) ? a : -a) : 0;
    end
    h[0] = 1000;
    energy = 0;
    for (int t = 0; t < NW; t++) energy += q2(h[t]) * q2(h[t]);
    threshold = SVW'(NP * energy / 4);
    // frame plan
    for (int f = 0; f < NFRAMES; f++) begin
      sgn[f] = (f < 6) ? 0 : 1;
      shift_of[f] = (f >= SHIFT_ON && f < SHIFT_OFF) ? 1 : 0;
    end
    for (int i = 0; i < TRAIN_LEN; i++)
      sgn[T0 + i] = TRAIN[TRAIN_LEN - 1 - i] ? sgn[T0 + i - 1] : -sgn[T0 + i - 1];
    sgn[LASTT + 1] = 1;
    for (int b = 0; b < NB; b++)
      for (int d = 0; d < ND; d++) begin
        data[b*ND + d] = 1'($urandom_range(0, 1));
        sgn[B0 + b*(NR+ND) + NR + d] = data[b*ND + d] ? 1 : -1;
      end
    ain_valid = 0;
    for (int l = 0; l < NAD; l++) ain[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // stimulus: one chunk of NAD samples per clock
  int chunk = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      ain_valid <= 1'b1;
      for (int l = 0; l < NAD; l++) begin
        int v;
        v = sample_at(chunk * NAD + l) + $urandom_range(0, 80) - 40;
        if (v > 2047) v = 2047;
        if (v < -2048) v = -2048;
        ain[l] <= 12'(v);
      end
      chunk <= chunk + 1;
    end
  end

  // monitors: sequential receiver
  always @(posedge clk) if (rst_n) begin
    if (seq_acq_reject) nrej++;
    if (seq_acq_done) begin
      nacq++;
      check(int'(seq_acq_start) % NF == OFF, $sformatf("seq: acquired phase %0d, expected %0d", int'(seq_acq_start) % NF, OFF));
    end
    if (seq_block_found) nfound++;
    if (seq_tmpl_step) ntmpl++;
    if (seq_track_applied) begin
      if (seq_track_applied_dir > 0) nlate++; else nearly++;
    end
    if (seq_overrun) check(0, "seq: demodulator overrun");
    if (seq_bit_valid) begin
      if (nbits < NB*ND) begin
        check(seq_bit == data[nbits], $sformatf("seq bit %0d: got %0d expected %0d", nbits, seq_bit, data[nbits]));
        if (nbits % ND != 0)
          check(cycle - bit_cycle_prev == NF / NAD,
                $sformatf("seq bit spacing %0d, expected %0d", cycle - bit_cycle_prev, NF / NAD));
      end
      bit_cycle_prev = cycle;
      nbits++;
    end
  end

  // monitors: parallel receiver
  always @(posedge clk) if (rst_n) begin
    if (par_acq_reject) prej++;
    if (par_acq_done) begin
      pacq++;
      check(int'(par_acq_start) % NF == OFF, $sformatf("par: acquired phase %0d, expected %0d", int'(par_acq_start) % NF, OFF));
    end
    if (par_block_found) pfound++;
    if (par_track_applied) begin
      if (par_track_applied_dir > 0) plate++; else pearly++;
    end
    if (par_bits_valid) begin
      if (pbits < NB*ND) begin
        for (int d = 0; d < ND; d++)
          check(par_bits[d] == data[pbits + d], $sformatf("par bit %0d: got %0d expected %0d", pbits + d, par_bits[d], data[pbits + d]));
        if (pbits > 0)
          check(cycle - pblk_prev == (NR + ND) * NF / NAD,
                $sformatf("par block spacing %0d, expected %0d", cycle - pblk_prev, (NR + ND) * NF / NAD));
      end
      pblk_prev = cycle;
      pbits += ND;
    end
  end

  initial begin
    wait (rst_n);
    wait (chunk >= NFRAMES * NF / NAD);
    repeat (20) @(posedge clk);
    check(nbits == NB*ND, $sformatf("seq: received %0d data bits, expected %0d", nbits, NB*ND));
    check(nrej >= 1, "seq: threshold rejection never happened");
    check(nacq == 1, $sformatf("seq: acquisitions accepted: %0d", nacq));
    check(nfound == 1, "seq: training pattern never found");
    check(ntmpl >= NB*NR, $sformatf("seq: template steps %0d", ntmpl));
    check(nlate >= 1, "seq: late adjustment never happened");
    check(nearly >= 1, "seq: early adjustment never happened");
    check(pbits == NB*ND, $sformatf("par: received %0d data bits, expected %0d", pbits, NB*ND));
    check(prej >= 1, "par: threshold rejection never happened");
    check(pacq == 1, $sformatf("par: acquisitions accepted: %0d", pacq));
    check(pfound == 1, "par: training pattern never found");
    check(plate >= 1, "par: late adjustment never happened");
    check(pearly >= 1, "par: early adjustment never happened");
    $display("seq mechanisms: reject=%0d acquire=%0d block_lock=%0d template=%0d late=%0d early=%0d bits=%0d",
             nrej, nacq, nfound, ntmpl, nlate, nearly, nbits);
    $display("par mechanisms: reject=%0d acquire=%0d block_lock=%0d late=%0d early=%0d bits=%0d",
             prej, pacq, pfound, plate, pearly, pbits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
