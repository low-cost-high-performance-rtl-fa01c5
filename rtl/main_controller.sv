// main_controller: supervises acquisition, lock and loss of the signal.
//
// Two states. SEARCH: the output generator is off; the sync generator is
// armed once the frames are stable and a mode is known. LOCKED is entered
// when a mode is valid and the regenerated sync runs; the TDD output is
// then generated (if the enable bit is set). A timer counts the ticks since
// the last stable frame; when it reaches LOSS_US (5 s) the WiBro signal is
// taken as lost or too weak, loss pulses, all analysis is cleared and the
// controller returns to SEARCH, which stops the TDD output. It locks again
// only after a new stable frame has restarted the timer. The 5 s of
// analysis before the output stops follows the document's measurement;
// the state machine is this design's.
module main_controller
  import tdd_pkg::*;
#(
  parameter int unsigned LOSS_US = 5_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic enable,       // from the control register
  input  logic frame_ok,     // stable frame seen
  input  logic stable,
  input  logic mode_valid,
  input  logic regen_valid,
  output logic arm,          // let the sync generator take a reference
  output logic gen_en,       // run the TDD signal generator
  output logic locked,
  output logic loss          // one clock: signal lost
);
  typedef enum logic {ST_SEARCH, ST_LOCKED} state_e;
  localparam int unsigned LW = $clog2(LOSS_US + 1);

  state_e state;
  logic [LW-1:0] since_ok;
  logic timeout;

  always_comb begin
    timeout = (since_ok >= LW'(LOSS_US));
    arm     = stable && mode_valid;
    locked  = (state == ST_LOCKED);
    gen_en  = locked && enable;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_SEARCH;
      since_ok <= '0;
      loss     <= 1'b0;
    end else begin
      loss <= 1'b0;
      if (frame_ok)
        since_ok <= '0;
      else if (tick && !timeout)
        since_ok <= since_ok + 1'b1;

      case (state)
        ST_SEARCH:
          if (mode_valid && regen_valid && !timeout) state <= ST_LOCKED;
        ST_LOCKED:
          if (timeout) begin
            state    <= ST_SEARCH;
            loss     <= 1'b1;
          end else if (!mode_valid || !regen_valid) begin
            state <= ST_SEARCH;
          end
        default: state <= ST_SEARCH;
      endcase
    end
  end
endmodule
