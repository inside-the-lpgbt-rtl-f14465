// vco_calibration: coarse frequency calibration of the LC VCO in PLL mode.
//
// An LC oscillator has little tuning range, so at start-up its centre
// frequency is brought near 5.12 GHz (128 x the 40 MHz reference) by
// switched capacitors. While the calibration runs, vctrl_hold asks the
// analog loop to hold the control voltage at a fixed value (VDD/4). For
// every capacitor code the block lets the oscillator settle for one
// reference period, counts VCO cycles over NREF reference periods and
// compares the count with RATIO*NREF; the code with the smallest error is
// kept. The procedure follows the LpGBT description; the code width, NREF
// and the exhaustive search are this design's choices.
//
// Interface: the block runs on the VCO clock; ref_clk is asynchronous and
// is synchronised here. Pulse start; busy is high until the search ends,
// cap_code drives the capacitor bank, done pulses once and best_err holds
// the remaining count error.
module vco_calibration #(
  parameter int CW    = 4,
  parameter int RATIO = 128,
  parameter int NREF  = 4
) (
  input  logic          clk_vco,
  input  logic          rst,
  input  logic          ref_clk,
  input  logic          start,
  output logic [CW-1:0] cap_code,
  output logic          vctrl_hold,
  output logic          busy,
  output logic          done,
  output logic [15:0]   best_err
);
  localparam int TARGET = RATIO * NREF;

  typedef enum logic [1:0] {IDLE, SETTLE, COUNT} state_e;
  state_e state;

  logic [2:0]    ref_sync;
  logic          ref_rise;
  logic [3:0]    nref;
  logic [15:0]   vcount;
  logic [CW-1:0] code, best;
  logic [15:0]   err;

  always_ff @(posedge clk_vco) begin
    if (rst) ref_sync <= '0;
    else     ref_sync <= {ref_sync[1:0], ref_clk};
  end
  assign ref_rise = ref_sync[1] && !ref_sync[2];

  assign err = (vcount > 16'(TARGET)) ? vcount - 16'(TARGET) : 16'(TARGET) - vcount;

  assign cap_code   = busy ? code : best;
  assign vctrl_hold = busy;

  always_ff @(posedge clk_vco) begin
    if (rst) begin
      state    <= IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      code     <= '0;
      best     <= '0;
      best_err <= '1;
      nref     <= '0;
      vcount   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state    <= SETTLE;
          busy     <= 1'b1;
          code     <= '0;
          best_err <= '1;
          nref     <= '0;
        end
        SETTLE: if (ref_rise) begin
          state  <= COUNT;
          nref   <= '0;
          vcount <= 16'd1;              // counts the cycle of the last edge too
        end
        COUNT: begin
          if (ref_rise) begin
            if (nref == 4'(NREF - 1)) begin
              if (err < best_err) begin
                best_err <= err;
                best     <= code;
              end
              if (code == '1) begin
                state <= IDLE;
                busy  <= 1'b0;
                done  <= 1'b1;
              end else begin
                code  <= code + 1'b1;
                state <= SETTLE;
              end
            end else begin
              nref   <= nref + 4'd1;
              vcount <= vcount + 16'd1;
            end
          end else begin
            vcount <= vcount + 16'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
