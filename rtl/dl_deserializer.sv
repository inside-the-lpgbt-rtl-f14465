// dl_deserializer: turns the 2.56 Gb/s down-link bit stream into 64-bit
// frames.
//
// Every bit-clock cycle the serial input is shifted into a 64-bit register
// (first bit ends in the MSB). The frame_prescaler's divided-clock pulses
// (ce) are counted; on every FRAME/2-th pulse the register, together with
// the bit arriving in that cycle, is copied to the output. A divide-by-three
// period of the pre-scaler therefore moves the capture one bit later, which
// is how the frame aligner slips the frame boundary.
//
// Interface: valid pulses for one bit-clock cycle with each new frame, one
// cycle after the capture edge; frame holds until the next capture.
module dl_deserializer #(
  parameter int FRAME = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sdin,
  input  logic             ce,
  output logic [FRAME-1:0] frame,
  output logic             valid
);
  localparam int PW = $clog2(FRAME / 2);

  logic [FRAME-2:0] sr;
  logic [PW-1:0]    pcnt;

  always_ff @(posedge clk) begin
    sr <= {sr[FRAME-3:0], sdin};
    if (rst) begin
      pcnt  <= '0;
      valid <= 1'b0;
      frame <= '0;
    end else begin
      valid <= 1'b0;
      if (ce) begin
        pcnt <= pcnt + 1'b1;
        if (pcnt == PW'(FRAME/2 - 1)) begin
          frame <= {sr, sdin};
          valid <= 1'b1;
        end
      end
    end
  end
endmodule
