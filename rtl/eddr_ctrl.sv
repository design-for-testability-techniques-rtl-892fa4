// eddr_ctrl: block sequencer of the EDDR processing element.
//
// The PE and the test code generator both accumulate one pixel pair per
// clock. This controller starts a block on `start` (accepted only when idle),
// clears the accumulators in that same clock edge, then raises `en` for NPIX
// cycles while `idx` walks through pixels 0 .. NPIX-1, and pulses `done` for
// one cycle when the last pixel has been accumulated. The document shows the
// datapath but not its control; this sequencer is this design's own.
//
// Timing: start sampled at edge 0 -> pixels accumulated at edges 1..NPIX ->
// done high during the cycle after edge NPIX (NPIX cycles after start).
// An assertion checks that done is a one-cycle pulse issued when idle.
module eddr_ctrl #(
  parameter int unsigned NPIX = eddr_pkg::NPIX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    clr,
  output logic                    en,
  output logic [$clog2(NPIX)-1:0] idx,
  output logic                    done
);
  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  always_comb begin
    busy = (state == S_RUN);
    clr  = start && (state == S_IDLE);
    en   = (state == S_RUN);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          idx   <= '0;
        end
        S_RUN: begin
          if (idx == $clog2(NPIX)'(NPIX - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse that ends a run
  a_done_ends_run: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (state == S_IDLE) && !$past(done));
endmodule
