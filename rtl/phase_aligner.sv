// phase_aligner: digital part of the e-link input phase aligner.
//
// The incoming e-link bit stream runs through a delay line whose taps are
// Tbit/8 apart (NPH = 15 taps, 14 unit cells = 1.75 bit periods); every
// tap is sampled by the internal clock once per bit and given to this
// block as taps[]. Where two neighbouring taps differ a data edge lies
// between them. Edges are counted in eight bins (tap index mod 8) over a
// window of 2**WIN_LOG2 bits; the sampling phase is put four taps (half a
// bit) after the most populated edge bin.
//   - Acquisition chooses a phase in 4..11 only, so that later tracking has
//     room on both sides.
//   - PA_AUTO keeps measuring and moves the phase one tap per window
//     towards the target; past the end of the line it jumps by 8 taps
//     (one bit) to the equivalent phase.
//   - PA_TRAIN acquires once, then freezes the learned phase.
//   - PA_STATIC uses static_phase.
// In the two static cases only the selected tap output is enabled (tap_en
// one-hot) and the dummy load of every disabled tap is switched on
// (dummy_en = ~tap_en) so that all cells see the same load; cell_en also
// stops the signal in the unit cells past the selected tap (cell k drives
// tap k+1). In PA_AUTO all taps and cells are enabled. The phase-selection
// rules, the three modes, the dummy loading and stopping the line follow
// the LpGBT description; the window, the binning and the one-tap tracking
// step are this design's choices.
//
// Interface: one taps sample per clock (the e-link bit clock); dout is the
// bit from the selected tap, one clock later; locked rises after the first
// acquisition.
module phase_aligner
  import lpgbt_pkg::*;
#(
  parameter int NPH      = 15,
  parameter int WIN_LOG2 = 6
) (
  input  logic            clk,
  input  logic            rst,
  input  pa_mode_e        mode,
  input  logic [3:0]      static_phase,
  input  logic [NPH-1:0]  taps,
  output logic [3:0]      phase,
  output logic            dout,
  output logic            locked,
  output logic [NPH-1:0]  tap_en,
  output logic [NPH-1:0]  dummy_en,
  output logic [NPH-2:0]  cell_en
);
  localparam int CW = WIN_LOG2 + 2;

  logic [CW-1:0]       hist [8];
  logic [WIN_LOG2-1:0] wcnt;
  logic [3:0]          ph_q;
  logic                frozen;

  // edges in this sample, per bin
  logic [1:0] inc [8];
  always_comb begin
    for (int b = 0; b < 8; b++) inc[b] = '0;
    for (int k = 0; k < NPH - 1; k++)
      if (taps[k] ^ taps[k+1]) inc[k % 8] = inc[k % 8] + 2'd1;
  end

  // target phase from the histogram (including this sample's edges)
  logic [2:0] ebin;
  logic [3:0] target;
  always_comb begin
    logic [CW-1:0] best;
    ebin = '0;
    best = '0;
    for (int b = 0; b < 8; b++)
      if (hist[b] + CW'(inc[b]) > best) begin
        best = hist[b] + CW'(inc[b]);
        ebin = 3'(b);
      end
    target = {1'b0, ebin + 3'd4};               // 0..7
    if (target < 4'd4) target = target + 4'd8;  // 4..11
  end

  // one-tap step of the tracking loop
  logic [3:0] step;
  always_comb begin
    logic [2:0] diff;
    diff = 3'(target - ph_q);
    step = ph_q;
    if (diff inside {3'd1, 3'd2, 3'd3})
      step = (ph_q == 4'(NPH - 1)) ? ph_q - 4'd7 : ph_q + 4'd1;
    else if (diff inside {3'd5, 3'd6, 3'd7})
      step = (ph_q == 4'd0) ? 4'd7 : ph_q - 4'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < 8; b++) hist[b] <= '0;
      wcnt   <= '0;
      ph_q   <= 4'd8;
      locked <= 1'b0;
      frozen <= 1'b0;
    end else begin
      wcnt <= wcnt + 1'b1;
      if (wcnt == '1) begin
        for (int b = 0; b < 8; b++) hist[b] <= '0;
        if (mode == PA_AUTO || (mode == PA_TRAIN && !frozen)) begin
          ph_q   <= locked ? step : target;
          locked <= 1'b1;
          if (mode == PA_TRAIN) frozen <= 1'b1;
        end
      end else begin
        for (int b = 0; b < 8; b++) hist[b] <= hist[b] + CW'(inc[b]);
      end
      if (mode != PA_TRAIN) frozen <= 1'b0;
    end
  end

  assign phase = (mode == PA_STATIC) ? static_phase : ph_q;

  always_comb begin
    if (mode == PA_AUTO || (mode == PA_TRAIN && !frozen)) tap_en = '1;
    else                                                   tap_en = NPH'(1) << phase;
    dummy_en = ~tap_en;
  end

  // a unit cell runs while some enabled tap lies after it
  always_comb begin
    logic run;
    run = 1'b0;
    for (int k = NPH - 2; k >= 0; k--) begin
      run        = run | tap_en[k+1];
      cell_en[k] = run;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= 1'b0;
    else     dout <= taps[phase];
  end
endmodule
