// Behavioural model (not synthesizable) of the voltage-controlled
// asymmetric ring oscillator.
// The real circuit is a ring of inverting delay elements with one NOR-like
// element that makes the two half periods travel through a different odd
// number of stages, so that an even number N of equally spaced timing
// signals comes out; only the fall delay of each element depends on the
// control voltage VGN. This model reproduces the result at its outputs,
// not the transistors: tap k falls k*T/N after tap 0 and rises half a
// period after its fall, and the spacing T/N equals the delay of one
// two-element stage. That stage delay is taken as that of a current-starved
// stage,
//   d = D_MIN_PS * (VDD - VT) / (VGN - VT), VGN limited to VT+0.1 .. VDD,
// which gives the shortest stage delay of about 600 ps at full control
// voltage (as in the original) and covers the 10-50 MHz range at N = 32
// (VGN about 1.2 V at 10 MHz, 3.2 V at 50 MHz). The law and VT are own
// choices; the delay is re-read from VGN at every step.
// Ports: vgn (control voltage, volts), en (stops the ring with all taps
// high when low), tap[N-1:0] (timing signals; tap 0 is node A).
`timescale 1ns/1fs
module asym_ring_osc #(
  parameter int  N           = 32,
  parameter real D_MIN_PS    = 600.0,
  parameter real VT          = 0.7,
  parameter real VDD         = 3.3
) (
  input  real          vgn,
  input  logic         en,
  output logic [N-1:0] tap
);
  real     d_ns;      // stage delay at the present control voltage
  real     prog;      // progress through the current stage, in stages
  realtime t_last;    // time up to which prog is accounted
  int      j;         // tap that fell last

  function automatic real stage_delay_ns(input real v);
    real vc;
    vc = (v < VT + 0.1) ? VT + 0.1 : ((v > VDD) ? VDD : v);
    return D_MIN_PS * (VDD - VT) / (vc - VT) / 1000.0;
  endfunction

  // A change of VGN closes the stretch run at the old speed.
  always @(vgn) begin
    prog   = prog + ($realtime - t_last) / d_ns;
    t_last = $realtime;
    d_ns   = stage_delay_ns(vgn);
  end

  initial begin
    tap    = '1;
    prog   = 0.0;
    t_last = 0.0;
    d_ns   = stage_delay_ns(vgn);
    j      = N - 1;
    forever begin
      if (!en) begin
        tap = '1;
        wait (en);
        prog   = 0.0;
        t_last = $realtime;
      end
      prog   = prog + ($realtime - t_last) / d_ns;
      t_last = $realtime;
      if ((1.0 - prog) * d_ns < 1.0e-5) begin
        // stage complete: next tap falls, the one opposite rises; a stage
        // overrun (speed raised during the wait) is carried forward
        prog = (prog > 1.0) ? prog - 1.0 : 0.0;
        j = (j + 1) % N;
        tap[j]             = 1'b0;
        tap[(j + N/2) % N] = 1'b1;
      end else begin
        #((1.0 - prog) * d_ns);
      end
    end
  end
endmodule
