// playback_fsm: step through the samples of one drum sound after a hit.
//
// A four-state machine drives the sample ROM address of one voice:
//   S0_WAIT  idle, address 0, until the voice's hit strength (volume) is non-zero;
//   S1_START clear the duration and address counters;
//   S2_HOLD  count clk cycles while the current sample is played;
//   S3_NEXT  clear the duration counter and step to the next address, or go back
//            to S0_WAIT once every sample has been played.
// A non-zero volume in any state restarts the sound from its first sample, so
// fast repeated hits (a drum roll) each restart playback; the counters are
// cleared on the same edge, so S1_START always shows address 0.
//
// Interface: duration_limit is the number of clk cycles each sample is held (the
// clk frequency divided by the sound's sample rate); addr_limit is the number
// of samples of the sound, played at addresses 0 .. addr_limit-1. addr feeds the
// sample ROM; FSM_RUNNING is high whenever the state is not S0_WAIT.
//
// Timing: volume is seen on a clk edge; the next cycle is S1_START with address 0
// and FSM_RUNNING high. Address 0 is then held for duration_limit+1 cycles (S1
// plus one sample period) and every later address for exactly duration_limit
// cycles (duration_limit-1 cycles of S2_HOLD and one of S3_NEXT); the machine
// is back in S0_WAIT after the last address's period. A duration_limit below 2
// acts as 2.
//
// Following the original design: the four states and their order, the
// duration/address counters and their widths, restart on every hit, and the
// two limit inputs. This design's own choices: the limits are a period and a
// count (exactly duration_limit cycles per sample, exactly addr_limit samples),
// and the synchronous reset.
module playback_fsm #(
  parameter int unsigned DUR_W  = drum_pkg::DUR_W,
  parameter int unsigned ADDR_W = drum_pkg::ROM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        volume,
  input  logic [DUR_W-1:0]  duration_limit,
  input  logic [ADDR_W-1:0] addr_limit,
  output logic [ADDR_W-1:0] addr,
  output logic              FSM_RUNNING
);

  typedef enum logic [1:0] {
    S0_WAIT  = 2'd0,
    S1_START = 2'd1,
    S2_HOLD  = 2'd2,
    S3_NEXT  = 2'd3
  } state_e;

  state_e            state, nextstate;
  logic [DUR_W-1:0]  duration_counter;
  logic [ADDR_W-1:0] addr_counter;
  logic              hold_done, last_sample;

  // S2_HOLD ends after duration_limit-1 cycles (at least one).
  assign hold_done   = ({1'b0, duration_counter} + (DUR_W+1)'(2)) >= {1'b0, duration_limit};
  // The address about to be left is the sound's last one.
  assign last_sample = ({1'b0, addr_counter} + (ADDR_W+1)'(1)) >= {1'b0, addr_limit};

  always_comb begin
    unique case (state)
      S0_WAIT:  nextstate = S0_WAIT;
      S1_START: nextstate = S2_HOLD;
      S2_HOLD:  nextstate = hold_done ? S3_NEXT : S2_HOLD;
      S3_NEXT:  nextstate = last_sample ? S0_WAIT : S2_HOLD;
      default:  nextstate = S0_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= S0_WAIT;
      duration_counter <= '0;
      addr_counter     <= '0;
    end else begin
      state <= (volume != 8'd0) ? S1_START : nextstate;
      if (volume != 8'd0) begin
        // a hit restarts the sound: S1_START already presents address 0
        duration_counter <= '0;
        addr_counter     <= '0;
      end else unique case (state)
        S0_WAIT, S1_START: begin
          duration_counter <= '0;
          addr_counter     <= '0;
        end
        S2_HOLD: duration_counter <= duration_counter + 1'b1;
        S3_NEXT: begin
          duration_counter <= '0;
          addr_counter     <= last_sample ? '0 : addr_counter + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign addr        = addr_counter;
  assign FSM_RUNNING = (state != S0_WAIT);

  // A running voice never addresses past its last sample.
  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (FSM_RUNNING && addr_limit != '0) |-> (addr < addr_limit));

endmodule
