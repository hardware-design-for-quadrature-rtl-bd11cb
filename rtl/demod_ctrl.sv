// Measurement sequencer for the quadrature demodulator.
//
// Cuts the stream of ADC samples into accumulation windows of N_SAMPLES
// samples each (one 50 kHz period at a 100 MHz sample rate by default) and
// steps through the N_CH*(N_CH-1)/2 electrode pairs of one tomography frame,
// one window per pair. Pairs are taken in the order (0,1), (0,2) ...
// (0,N-1), (1,2) ... (N-2,N-1). A frame therefore lasts
// N_SAMPLES * N_CH*(N_CH-1)/2 samples, which is the frame-rate formula of the
// design: about 100 frames/s for 32 electrodes at 100 MHz.
//
// Interface: `run` enables measuring. It is looked at only between windows:
// a window, once started, always completes, and a frame that is stopped
// resumes at the pair where it stopped. smp_valid marks a valid ADC sample.
// For each accepted sample (take) the outputs first/last say whether it opens
// or closes its window, and pair/tx/rx/frame_end describe the window it
// belongs to. tx/rx are also the electrode selection for the analog front end.
// All these outputs are combinational from the state and smp_valid, so they
// line up with the sample presented in the same cycle.
//
// The window length and frame size follow the design's throughput formula;
// the pair order, the run/stop rule and the handshake are this
// implementation's choices.
module demod_ctrl #(
  parameter int unsigned N_SAMPLES = 2000,
  parameter int unsigned N_CH      = 32,
  parameter int unsigned N_PAIRS   = N_CH * (N_CH - 1) / 2,
  parameter int unsigned SCNT_W    = $clog2(N_SAMPLES + 1),
  parameter int unsigned PAIR_W    = $clog2(N_PAIRS + 1),
  parameter int unsigned CH_W      = $clog2(N_CH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              smp_valid,
  output logic              take,
  output logic              first,
  output logic              last,
  output logic              frame_end,
  output logic [PAIR_W-1:0] pair,
  output logic [CH_W-1:0]   tx,
  output logic [CH_W-1:0]   rx,
  output logic              busy
);

  logic [SCNT_W-1:0] scnt;      // samples already taken in this window
  logic              in_win;

  always_comb begin
    take      = smp_valid && (in_win || run);
    first     = take && !in_win;
    last      = take && (scnt == SCNT_W'(N_SAMPLES - 1));
    frame_end = last && (pair == PAIR_W'(N_PAIRS - 1));
    busy      = in_win;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt   <= '0;
      in_win <= 1'b0;
      pair   <= '0;
      tx     <= '0;
      rx     <= CH_W'(1);
    end else if (take) begin
      if (last) begin
        scnt   <= '0;
        in_win <= 1'b0;
        if (frame_end) begin
          pair <= '0;
          tx   <= '0;
          rx   <= CH_W'(1);
        end else begin
          pair <= pair + 1'b1;
          if (rx == CH_W'(N_CH - 1)) begin
            tx <= tx + 1'b1;
            rx <= tx + CH_W'(2);
          end else begin
            rx <= rx + 1'b1;
          end
        end
      end else begin
        scnt   <= scnt + 1'b1;
        in_win <= 1'b1;
      end
    end
  end

  initial assert (N_CH >= 2 && N_SAMPLES >= 1)
    else $error("demod_ctrl: need N_CH >= 2 and N_SAMPLES >= 1");

endmodule
