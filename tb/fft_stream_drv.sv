// fft_stream_drv: stimulus and checker for one streaming FFT processor.
//
// Feeds five frames of N = 2^LOGN complex samples in natural order:
//   0, 1 : uniform random parts in (-1/sqrt2, 1/sqrt2), no gaps
//   2    : as 0, with random idle cycles (in_valid low) between samples
//   3    : full-scale parts (+-(1 - 2^-(W_IN-1))), with idle cycles: forces
//          saturation inside the pipeline
//   4    : zeros, no gaps, to push frame 3 out
// Every output sample is compared bit for bit with the fixed-point model of
// fft_ref_pkg (R22 selects the radix-2^2 model) and its out_bin with the
// bit-reversed position. For frames 0-2 the output is also compared with a
// double-precision FFT and the SQNR must reach SQNR_MIN dB. Further checks:
// first-output latency of N + 2*LOGN cycles, one output per cycle while the
// input is gapless, ovf low before frame 3 and high after it (from 64 points
// up; below, high exactly when the model saturated), stalls seen.
// `done` rises when frames 0-3 have been checked.
module fft_stream_drv
  import fft_ref_pkg::*;
#(
  parameter int unsigned LOGN  = 6,
  parameter int unsigned W_IN  = 18,
  parameter int unsigned W_OUT = 18,
  parameter bit          R22   = 1'b0,
  parameter int unsigned WL [fft_pkg::MAX_LOGN] = '{11, 12, 13, 13, 13, 14, 0, 0, 0, 0, 0, 0, 0},
  parameter real         SQNR_MIN = 40.0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    in_valid,
  output logic signed [W_IN-1:0]  in_re,
  output logic signed [W_IN-1:0]  in_im,
  input  logic                    out_valid,
  input  logic signed [W_OUT-1:0] out_re,
  input  logic signed [W_OUT-1:0] out_im,
  input  logic [LOGN-1:0]         out_bin,
  input  logic                    ovf,
  output logic                    done,
  output int                      checks,
  output int                      failures,
  output int                      stalls,
  output int                      model_sats
);
  localparam int N       = 1 << LOGN;
  localparam int NFRAMES = 5;

  longint in_r   [NFRAMES][];
  longint in_i   [NFRAMES][];
  longint exp_re [NFRAMES][];
  longint exp_im [NFRAMES][];
  real    fl_re  [NFRAMES][];
  real    fl_im  [NFRAMES][];
  real    sig_e  [NFRAMES];
  real    err_e  [NFRAMES];
  int     wl_a   [];
  int     bin_fail;
  int     val_fail;
  logic   frames_ready = 1'b0;
  logic   models_ready = 1'b0;

  longint cycle;
  longint first_in_cycle, first_out_cycle, last_out_cycle;
  int     nout;
  int     gap_fail;

  function automatic longint rnd_small();
    longint a = longint'($floor((2.0 ** (W_IN - 1)) / $sqrt(2.0))) - 1;  // |x| < 1/sqrt2
    return longint'($urandom_range(32'(2 * a))) - a;
  endfunction

  function automatic longint rnd_full();
    longint a = (64'sd1 <<< (W_IN - 1)) - 1;
    return ($urandom_range(1) != 0) ? a : -a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // -------- build frames and their expected outputs --------
  initial begin
    int ns;
    checks = 0; failures = 0; stalls = 0; model_sats = 0; done = 1'b0;
    for (int f = 0; f < NFRAMES; f++) begin
      sig_e[f] = 0.0;
      err_e[f] = 0.0;
    end
    wl_a = new[LOGN];
    for (int k = 0; k < LOGN; k++) wl_a[k] = int'(WL[k]);
    for (int f = 0; f < NFRAMES; f++) begin
      exp_re[f] = new[N];
      exp_im[f] = new[N];
      fl_re[f]  = new[N];
      fl_im[f]  = new[N];
      for (int i = 0; i < N; i++) begin
        if (f <= 2)      begin exp_re[f][i] = rnd_small(); exp_im[f][i] = rnd_small(); end
        else if (f == 3) begin exp_re[f][i] = rnd_full();  exp_im[f][i] = rnd_full();  end
        else             begin exp_re[f][i] = 0;           exp_im[f][i] = 0;           end
        fl_re[f][i] = real'(exp_re[f][i]) / (2.0 ** (W_IN - 1));
        fl_im[f][i] = real'(exp_im[f][i]) / (2.0 ** (W_IN - 1));
      end
      in_r[f] = exp_re[f];
      in_i[f] = exp_im[f];
    end
    frames_ready = 1'b1;
  end

  // -------- drive --------
  initial begin
    in_valid = 1'b0;
    in_re    = '0;
    in_im    = '0;
    wait (models_ready && rst_n);
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      if (f == 3) check(ovf == 1'b0, "ovf must stay low for in-range input");
      for (int i = 0; i < N; i++) begin
        if (f == 2 || f == 3) begin
          // random idle cycles, and always one in the middle of the frame
          while ($urandom_range(3) == 0 || (i == N / 2 && stalls == 0)) begin
            in_valid <= 1'b0;
            stalls++;
            @(posedge clk);
          end
        end
        in_valid <= 1'b1;
        in_re    <= W_IN'(in_r[f][i]);
        in_im    <= W_IN'(in_i[f][i]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // -------- models (run while the frames are fed) --------
  initial begin
    int ns;
    longint tr[], ti[];
    real    ur[], ui[];
    wait (frames_ready);
    for (int f = 0; f < NFRAMES; f++) begin
      ns = 0;
      tr = exp_re[f];
      ti = exp_im[f];
      ur = fl_re[f];
      ui = fl_im[f];
      if (R22) fx_r22(tr, ti, LOGN, W_IN, W_OUT, wl_a, ns);
      else     fx_r2 (tr, ti, LOGN, W_IN, W_OUT, wl_a, ns);
      fl_fft(ur, ui, LOGN);
      exp_re[f] = tr;
      exp_im[f] = ti;
      fl_re[f]  = ur;
      fl_im[f]  = ui;
      if (f == 3) model_sats = ns;
    end
    models_ready = 1'b1;
  end

  // -------- monitor --------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle <= 0;
    end else begin
      cycle <= cycle + 1;
    end
  end

  initial begin
    int f, p;
    real hr, hi, er, ei, s;
    nout = 0; first_in_cycle = -1; first_out_cycle = -1; last_out_cycle = -1;
    bin_fail = 0; val_fail = 0; gap_fail = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (in_valid && first_in_cycle < 0) first_in_cycle = cycle;
      if (out_valid && nout < (NFRAMES - 1) * N) begin
        f = nout / N;
        p = nout % N;
        if (first_out_cycle < 0) first_out_cycle = cycle;
        if (f == 0 && p > 0 && cycle != last_out_cycle + 1) gap_fail++;
        last_out_cycle = cycle;
        if (longint'(out_re) != exp_re[f][p] || longint'(out_im) != exp_im[f][p]) begin
          val_fail++;
          if (val_fail < 10)
            $display("mismatch frame %0d pos %0d: got (%0d,%0d) expected (%0d,%0d)",
                     f, p, out_re, out_im, exp_re[f][p], exp_im[f][p]);
        end
        if (32'(out_bin) != bitrev(p, LOGN)) bin_fail++;
        hr = real'(out_re) / (2.0 ** (W_OUT - 1));
        hi = real'(out_im) / (2.0 ** (W_OUT - 1));
        er = hr - fl_re[f][p];
        ei = hi - fl_im[f][p];
        sig_e[f] += fl_re[f][p] * fl_re[f][p] + fl_im[f][p] * fl_im[f][p];
        err_e[f] += er * er + ei * ei;
        nout++;
        if (p == N - 1) begin
          check(val_fail == 0, $sformatf("frame %0d bit-exact against the fixed-point model", f));
          check(bin_fail == 0, $sformatf("frame %0d out_bin order", f));
          val_fail = 0;
          bin_fail = 0;
          if (f <= 2) begin
            s = 10.0 * $log10(sig_e[f] / err_e[f]);
            $display("N=%0d %s I/O %0d bit frame %0d: SQNR %0.2f dB", N, R22 ? "R2^2SDF" : "R2SDF", W_IN, f, s);
            check(s >= SQNR_MIN, $sformatf("frame %0d SQNR %0.2f >= %0.2f", f, s, SQNR_MIN));
          end
          if (f == 0) begin
            check(first_out_cycle - first_in_cycle == longint'(N) + longint'(2 * LOGN),
                  $sformatf("latency %0d, expected %0d", first_out_cycle - first_in_cycle,
                            N + 2 * LOGN));
            check(gap_fail == 0, "one output per cycle with gapless input");
          end
          if (f == 3) begin
            // below 64 points a random-sign full-scale frame may miss every
            // saturating twiddle position; ovf must then still match the model
            check(ovf == (model_sats > 0), "ovf set exactly when the model saturated");
            if (LOGN >= 6) check(model_sats > 0, "full-scale frame saturates in the model");
          end
          if (f == NFRAMES - 2) begin
            check(stalls > 0, "input stalls were exercised");
            done = 1'b1;
          end
        end
      end
    end
  end
endmodule
