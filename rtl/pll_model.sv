// pll_model: BEHAVIOURAL MODEL (not synthesizable) of an on-chip analog PLL.
//
// An FPGA PLL is an analog macro; in hardware this model is replaced by the
// vendor's PLL primitive configured with the same factors.  The model
// reproduces what the TRNG relies on: two outputs locked in frequency and
// phase to the input, clk0 at F_in*CLK0_MUL/CLK0_DIV and clk1 at
// F_in*CLK1_MUL/CLK1_DIV, each edge displaced by Gaussian jitter of
// JITTER_RMS_PS (the intrinsic PLL jitter, at least 15 ps in the original).
//
// How it works: the input period is estimated from all rising input edges
// seen so far (first edge to latest edge over the edge count), so the
// estimate converges and the outputs stay phase-locked to the input.  Output
// edge k of an output with half period H is placed at t0 + k*H + jitter,
// where t0 is the first input edge, so edges of all outputs coincide with
// input edges every DIV input periods, as in a real zero-phase PLL.  After
// LOCK_CYCLES input edges the outputs start and locked goes high.  Jitter is
// independent per edge and does not accumulate.  The Gaussian is drawn as
// the sum of 12 uniform variates.
//
// Interface: inclk input clock, clk0/clk1 outputs (0 while not locked),
// locked.  Output clocks have 50 % duty cycle.
module pll_model #(
  parameter int unsigned CLK0_MUL      = 1,
  parameter int unsigned CLK0_DIV      = 1,
  parameter int unsigned CLK1_MUL      = 1,
  parameter int unsigned CLK1_DIV      = 1,
  parameter real         JITTER_RMS_PS = 15.0,
  parameter int unsigned LOCK_CYCLES   = 8
) (
  input  logic inclk,
  output logic clk0,
  output logic clk1,
  output logic locked
);

  timeunit 1ns;
  timeprecision 1fs;

  realtime     t_first;
  realtime     t_last;
  int unsigned n_edges;

  initial begin
    clk0    = 1'b0;
    clk1    = 1'b0;
    locked  = 1'b0;
    n_edges = 0;
    t_first = 0.0;
    t_last  = 0.0;
  end

  // Standard normal variate from 12 uniform variates.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // Estimated input period in ns.
  function automatic real t_in();
    return (n_edges > 1) ? (t_last - t_first) / real'(n_edges - 1) : 0.0;
  endfunction

  always @(posedge inclk) begin
    if (n_edges == 0) t_first = $realtime;
    t_last  = $realtime;
    n_edges = n_edges + 1;
    if (n_edges >= LOCK_CYCLES) locked = 1'b1;
  end

  // One edge generator per output.
  task automatic run_output(input int unsigned mul, input int unsigned div,
                            input bit which);
    longint unsigned k;
    real             half;
    real             target;
    real             dly;
    // first edge index after the current time
    half = t_in() * real'(div) / (2.0 * real'(mul));
    k    = longint'(($realtime - t_first) / half) + 2;
    forever begin
      half   = t_in() * real'(div) / (2.0 * real'(mul));
      target = t_first + real'(k) * half + gauss() * JITTER_RMS_PS * 1.0e-3;
      dly    = target - $realtime;
      if (dly < 0.0) dly = 0.0;
      #(dly);
      if (which) clk1 = (k % 2 == 0);
      else       clk0 = (k % 2 == 0);
      k++;
    end
  endtask

  initial begin
    wait (locked);
    fork
      run_output(CLK0_MUL, CLK0_DIV, 1'b0);
      run_output(CLK1_MUL, CLK1_DIV, 1'b1);
    join
  end

endmodule
