// eom_counter: counting part of the down-link eye-opening monitor.
//
// The analog front end compares the received signal with a reference
// voltage chosen by vref_sel (31 levels, about 20 mV apart, from VDD/2 to
// VDD) and a phase interpolator places the sampling clock at one of 64
// phases (phase_sel, about 6.1 ps apart). This block samples the
// comparator output on the rising edge of that clock and counts the ones
// during a window of a fixed number of clocks, which gives the signal
// density at one (phase, voltage) point of the eye diagram; stepping
// through all points draws the eye. The window length, 2**(win_sel+5)
// clocks, and the saturating 16-bit counter are this design's choices; the
// point grid follows the LpGBT.
//
// Interface: pulse start with the point settings; they are held on
// phase_sel/vref_sel, busy is high during the window, then done pulses for
// one clock and count holds the result until the next start.
module eom_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [5:0]  phase_in,
  input  logic [4:0]  vref_in,
  input  logic [3:0]  win_sel,
  input  logic        cmp,
  output logic [5:0]  phase_sel,
  output logic [4:0]  vref_sel,
  output logic        busy,
  output logic        done,
  output logic [15:0] count
);
  logic [19:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_sel <= '0;
      vref_sel  <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      count     <= '0;
      remaining <= '0;
    end else begin
      done  <= 1'b0;
      if (start && !busy) begin
        phase_sel <= phase_in;
        vref_sel  <= (vref_in > 5'd30) ? 5'd30 : vref_in;
        count     <= '0;
        remaining <= 20'd32 << win_sel;
        busy      <= 1'b1;
      end else if (busy) begin
        // comparator output sampled by this clock edge
        if (cmp && count != '1) count <= count + 16'd1;
        remaining <= remaining - 20'd1;
        if (remaining == 20'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
