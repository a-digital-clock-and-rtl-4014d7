// dpc_model: behavioural model of a digital-to-phase converter (DPC) with
// unlimited range, for simulation only (it uses delays and real numbers).
//
// It produces 2M clock phases at f_baud/M, spaced half a UI apart: phase k
// rises at half-UI slot k (mod 2M) and falls M slots later, so each phase
// has a 50 % duty cycle. Before each slot the code is read; a change of d
// codes (taken as the short way round the 2^CODE_W circle, so that a wrap
// of the code is one step) shortens the next slot by d * UI / 2^CODE_W.
// A higher code therefore moves all phases earlier, and a code that keeps
// counting in one direction produces a steady frequency offset. The local
// reference is ideal: UI_PS sets the nominal bit period in picoseconds.
module dpc_model #(
  parameter int  M      = 4,
  parameter int  CODE_W = 9,
  parameter real UI_PS  = 200.0
) (
  input  logic [CODE_W-1:0] code,
  output logic [2*M-1:0]    ph
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int HALF = 1 << (CODE_W - 1);
  localparam int FULL = 1 << CODE_W;

  initial begin
    int  k, last, d;
    real step;
    ph   = '0;
    k    = 0;
    last = int'(code);
    forever begin
      d = int'(code) - last;
      if (d >= HALF) d -= FULL;
      if (d < -HALF) d += FULL;
      last = int'(code);
      step = UI_PS / 2.0 - real'(d) * UI_PS / real'(FULL);
      #(step);
      ph[k] = 1'b1;
      ph[(k + M) % (2 * M)] = 1'b0;
      k = (k + 1) % (2 * M);
    end
  end
endmodule
