// frame_prescaler: the down-link frame-alignment pre-scaler.
//
// It normally divides the 2.56 GHz bit clock by two. When a slip is
// requested it performs a single divide-by-three period, which delays every
// later divided-clock edge by one bit period (390 ps at 2.56 Gb/s) and so
// moves the frame boundary of the deserializer by one bit. After executing
// a slip it waits for the request to be released before it accepts the
// next one. This behaviour follows the LpGBT pre-scaler, and so does the
// protection against single-event upsets: with TMR set (the default) the
// state registers and the next-state logic are triplicated and every
// replica is reloaded from the 2-of-3 majority of all three, so an upset
// in one replica is outvoted at once and scrubbed on the next clock.
// Presenting the divided clock as a one-cycle enable pulse (ce) for a
// single-clock design is this design's choice, as is keeping one clock
// tree (the chip also triplicates the clocks). A synthesis flow must be
// told to keep the three identical replicas, or it merges them.
//
// Interface: ce is high in the first bit-clock cycle of every divided
// period. A request seen while ready is high, at the end of a period,
// makes the next period three cycles long; ready then stays low until req
// is low. ce and ready are decoded from the voted state.
module frame_prescaler #(
  parameter bit TMR = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  output logic ce,
  output logic ready
);
  localparam int NR = TMR ? 3 : 1;

  // state of one replica: {ready, last, cnt}; last is the index of the
  // last cycle of the current period
  typedef struct packed {
    logic       ready;
    logic [1:0] last;
    logic [1:0] cnt;
  } state_t;

  state_t q [NR];
  state_t v;          // voted state

  if (TMR) begin : g_vote
    assign v = (q[0] & q[1]) | (q[0] & q[2]) | (q[1] & q[2]);
  end else begin : g_single
    assign v = q[0];
  end

  assign ce    = (v.cnt == 2'd0);
  assign ready = v.ready;

  for (genvar r = 0; r < NR; r++) begin : g_rep
    state_t d;
    always_comb begin
      d = v;
      if (v.cnt == v.last) begin
        d.cnt = '0;
        if (req && v.ready) begin
          d.last  = 2'd2;      // one divide-by-3 period
          d.ready = 1'b0;
        end else begin
          d.last  = 2'd1;
        end
      end else begin
        d.cnt = v.cnt + 2'd1;
      end
      if (!req) d.ready = 1'b1;
    end
    always_ff @(posedge clk) begin
      if (rst) q[r] <= '{ready: 1'b1, last: 2'd1, cnt: 2'd0};
      else     q[r] <= d;
    end
  end
endmodule
