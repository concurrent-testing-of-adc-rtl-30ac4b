// Test session controller: distributes HIT to the compactor and generator.
//
// A `start` pulse seeds the modulo adder and loads the test generator, then
// the controller waits for HIT (already synchronised to clk). Each accepted
// HIT makes one `add` pulse, which samples the ADC code into the adder, and
// one `advance` pulse, which moves the generator (and so the DAC) to the
// next test level, exactly as the HIT line of the method drives both. When
// the generator's last pattern has been hit the controller waits one clock
// for the adder register and then latches the checker's verdict: `done`
// rises with `fault` valid and stays until the next `start`.
//
// After every accepted HIT, and after `start`, the controller ignores HIT
// for BLANK clocks, long enough for the new DAC level to reach the
// comparator and its result to cross the synchroniser; a stale HIT from the
// old level is thus never counted twice. `blanked` pulses for a HIT seen
// during that window. The blanking rule, the one-hot pulses and the
// latched verdict are this design's choices; the method fixes only that HIT
// drives adder and generator and that the signature is judged at the end.
// A session with m = 0 goes straight to the check. Reset is asynchronous,
// active low.
module test_controller
  import conc_test_pkg::*;
#(
  parameter int unsigned BLANK = 4,
  parameter int unsigned CW = CNT_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          hit_sync,
  input  logic          tg_last,
  input  logic          tg_exhausted,
  input  logic          fault_now,
  output logic          seed_load,
  output logic          tg_load,
  output logic          add,
  output logic          advance,
  output logic          blanked,
  output logic          busy,
  output logic          done,
  output logic          fault,
  output logic [CW-1:0] hits,
  output ctrl_state_e   state
);

  localparam int unsigned BW = $clog2(BLANK + 1);

  logic [BW-1:0] blank_cnt;
  logic          accept;

  assign accept    = (state == ST_RUN) && !tg_exhausted && (blank_cnt == '0) && hit_sync;
  assign add       = accept;
  assign advance   = accept;
  assign blanked   = (state == ST_RUN) && (blank_cnt != '0) && hit_sync;
  assign seed_load = start;
  assign tg_load   = start;
  assign busy      = (state == ST_RUN) || (state == ST_CHECK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      blank_cnt <= '0;
      done      <= 1'b0;
      fault     <= 1'b0;
      hits      <= '0;
    end else if (start) begin
      state     <= ST_RUN;
      blank_cnt <= BW'(BLANK);
      done      <= 1'b0;
      fault     <= 1'b0;
      hits      <= '0;
    end else begin
      unique case (state)
        ST_IDLE: ;
        ST_RUN: begin
          if (tg_exhausted) begin
            state <= ST_CHECK;
          end else if (blank_cnt != '0) begin
            blank_cnt <= blank_cnt - 1'b1;
          end else if (hit_sync) begin
            hits      <= hits + 1'b1;
            blank_cnt <= BW'(BLANK);
            if (tg_last) state <= ST_CHECK;
          end
        end
        ST_CHECK: begin
          state <= ST_DONE;
          done  <= 1'b1;
          fault <= fault_now;
        end
        ST_DONE: ;
      endcase
    end
  end

  // A HIT is only acted on while a session runs and never during blanking.
  assert property (@(posedge clk) disable iff (!rst_n) add |-> (state == ST_RUN && blank_cnt == '0));
  // The adder and the generator always move together.
  assert property (@(posedge clk) disable iff (!rst_n) add == advance);

endmodule
