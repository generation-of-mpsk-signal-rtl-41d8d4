// phase_meter: behavioural model of a sampling phase-difference meter.
//
// Not hardware of the transmitter: it stands in for the bench measurement
// that reads two logic signals at a fixed sample rate and measures their
// phase difference from sample counts alone:
//   1. find two successive low-to-high transitions of the first signal; the
//      number of samples between them is one cycle;
//   2. find a low-to-high transition of the first signal and the next
//      low-to-high transition of the second signal; the number of samples
//      between them is the time shift;
//   3. phase = shift / cycle * 360 degrees.
// With the modulated output as the first signal and a reference carrier as
// the second, the result is how far the output leads the reference.
//
// Interface: a pulse on start (sampled on samp_clk) begins one measurement;
// done pulses for one sample period when cycle_samples, shift_samples and
// phase_mdeg (phase in thousandths of a degree) are valid.
module phase_meter (
  input  logic samp_clk,
  input  logic start,
  input  logic sig_first,
  input  logic sig_second,
  output logic done,
  output int   cycle_samples,
  output int   shift_samples,
  output int   phase_mdeg
);
  logic prev_first, prev_second;
  logic rise_first, rise_second;

  // One sample: wait for the sample clock and detect rising transitions.
  task automatic tick();
    @(posedge samp_clk);
    rise_first  = sig_first && !prev_first;
    rise_second = sig_second && !prev_second;
    prev_first  = sig_first;
    prev_second = sig_second;
  endtask

  initial begin
    done = 1'b0;
    cycle_samples = 0;
    shift_samples = 0;
    phase_mdeg = 0;
    prev_first = 1'b1;
    prev_second = 1'b1;
    forever begin
      tick();
      done = 1'b0;
      if (start) begin
        int n;
        // Step 1: one period of the first signal.
        do tick(); while (!rise_first);
        n = 0;
        do begin tick(); n++; end while (!rise_first);
        cycle_samples = n;
        // Step 2: from this rise of the first signal to the next rise of the
        // second one (which may be this very sample).
        n = 0;
        while (!rise_second) begin tick(); n++; end
        shift_samples = n;
        // Step 3.
        phase_mdeg = int'((longint'(shift_samples) * 360000) / longint'(cycle_samples));
        done = 1'b1;
      end
    end
  end
endmodule
