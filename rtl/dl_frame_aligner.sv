// dl_frame_aligner: finds the down-link frame boundary by its header.
//
// On every received frame the 4-bit header is compared with
// lpgbt_pkg::DL_HEADER. While hunting, a wrong header makes the aligner
// request a one-bit slip from the frame_prescaler (request held until the
// pre-scaler shows it has taken it, then released, as the pre-scaler
// requires), after which the next frame, captured across the slip, is
// ignored. LOCK_N consecutive good headers declare lock; in lock, UNLOCK_N
// consecutive bad headers return to hunting. The slip mechanism follows
// the LpGBT; the header value and the two thresholds are this design's
// choice.
//
// Interface: valid/header come from dl_deserializer; slip_req/slip_ready
// connect to frame_prescaler; locked is high while the boundary is held.
module dl_frame_aligner
  import lpgbt_pkg::*;
#(
  parameter int LOCK_N   = 8,
  parameter int UNLOCK_N = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid,
  input  logic [DL_HDR-1:0] header,
  input  logic              slip_ready,
  output logic              slip_req,
  output logic              locked,
  output logic [15:0]       slips
);
  typedef enum logic [1:0] {HUNT, SLIP, SKIP, LOCK} state_e;
  state_e state;
  logic [7:0] cnt;
  logic       hdr_ok;
  assign hdr_ok   = (header == DL_HEADER);
  assign slip_req = (state == SLIP);
  assign locked   = (state == LOCK);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= HUNT;
      cnt   <= '0;
      slips <= '0;
    end else begin
      case (state)
        HUNT: if (valid) begin
          if (hdr_ok) begin
            if (cnt == 8'(LOCK_N - 1)) begin state <= LOCK; cnt <= '0; end
            else cnt <= cnt + 8'd1;
          end else begin
            state <= SLIP;
            cnt   <= '0;
          end
        end
        SLIP: if (!slip_ready) begin       // pre-scaler took the request
          state <= SKIP;
          slips <= slips + 16'd1;
        end
        SKIP: if (valid) state <= HUNT;
        LOCK: if (valid) begin
          if (hdr_ok) cnt <= '0;
          else if (cnt == 8'(UNLOCK_N - 1)) begin state <= HUNT; cnt <= '0; end
          else cnt <= cnt + 8'd1;
        end
        default: state <= HUNT;
      endcase
    end
  end
endmodule
