// brlwe_ctrl: sequencer of the AB + C structure.
//
// One operation is a LOAD phase of N cycles followed by a COMP phase of
// V = N/U cycles:
//   LOAD  ctr-1 = 0: the D cells form a shift register; C enters serially
//         through the ctr-1 MUX while the B shift register loads one bit per
//         cycle. The sign shift register is cleared. If the previous result
//         has not been read yet it leaves the far-right PB at the same time
//         (ctr-2 = 1), so unloading is hidden under loading.
//   COMP  ctr-1 = 1: circular accumulation; the A coefficients of this cycle
//         are taken from the input and a '1' is shifted into the sign register.
//   DRAIN ctr-1 = 0, ctr-2 = 1 for N cycles: only shifts the pending result
//         out (for the last operation of a batch).
// start in IDLE begins an operation; drain in IDLE with a pending result
// begins a DRAIN. done pulses for one cycle after the last COMP cycle. idx is
// the cycle number within the current phase.
//
// The document names the control signals ctr-1 and ctr-2 and the three
// phases; the state machine, the handshake and the overlap of unloading with
// loading are this design's own.
module brlwe_ctrl
  import brlwe_pkg::*;
#(
  parameter int unsigned N = 512,
  parameter int unsigned V = 512,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          drain,
  output logic          ctr1,      // 0: serial shift/load, 1: accumulate
  output logic          ctr2,      // output buffer enable (result leaving)
  output logic          d_en,      // D cells update
  output logic          b_load,    // B shift register shifts
  output logic          s_clr,     // clear the sign shift register
  output logic          s_shift,   // shift a '1' into the sign register
  output logic          load,      // b_in / c_in consumed this cycle
  output logic          comp,      // a_in consumed this cycle
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] idx
);

  ctrl_state_e state;
  logic [CW-1:0] cnt;
  logic          pending;  // a computed result sits in the D cells

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cnt     <= '0;
      pending <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          cnt <= '0;
          if (start)                 state <= ST_LOAD;
          else if (drain && pending) state <= ST_DRAIN;
        end
        ST_LOAD: begin
          if (cnt == CW'(N - 1)) begin
            cnt     <= '0;
            pending <= 1'b0;
            state   <= ST_COMP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_COMP: begin
          if (cnt == CW'(V - 1)) begin
            cnt     <= '0;
            pending <= 1'b1;
            done    <= 1'b1;
            state   <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_DRAIN: begin
          if (cnt == CW'(N - 1)) begin
            cnt     <= '0;
            pending <= 1'b0;
            state   <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    ctr1    = (state == ST_COMP);
    ctr2    = (state == ST_DRAIN) || ((state == ST_LOAD) && pending);
    d_en    = (state != ST_IDLE);
    b_load  = (state == ST_LOAD);
    s_clr   = (state == ST_LOAD);
    s_shift = (state == ST_COMP);
    load    = (state == ST_LOAD);
    comp    = (state == ST_COMP);
    busy    = (state != ST_IDLE);
    idx     = cnt;
  end

  // A phase never runs past its length.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_COMP) |-> (int'(cnt) < int'(V)));

endmodule
