// da_controller: sequencer of a DA filter engine; it produces the circuit-
// clock (clk_C) control and the system-clock (clk_S) strobes from one clock.
//
// One sample takes G = N/BCF clocks in state ST_RUN. During them the delay
// lines shift (shift), the accumulator adds the table words, and in the last
// one (cnt == G-1) the MSB multiplexer selects the correction table
// (msb_sel) and the finished sum/carry pair is captured (cap, the clk_S
// capture registers). The accumulator is cleared (acc_clr, the "rst_n" of
// the accumulator registers in the paper's figures) on the clock edge that
// loads a new sample.
//
// FEEDBACK = 0 (FIR): a new sample may be loaded on the last ST_RUN clock, so
// samples follow each other every G clocks with no gap.
// FEEDBACK = 1 (IIR): after ST_RUN comes one ST_WB clock, in which the
// finished output is added up, quantised and written into the feedback delay
// line (wb); the next sample is loaded on that clock, giving G+1 clocks per
// sample. The extra clock is this design's choice: the output of sample n
// must be in the delay line before sample n+1 starts.
//
// Handshake: in_ready is high in ST_IDLE and on the clock where the next
// sample can be taken; a sample is taken when in_valid && in_ready (load).
// The two clock domains of the paper are replaced by one clock plus
// enables; that, the handshake and the reset are this design's choices.
module da_controller
  import da_pkg::*;
#(
  parameter int G        = 8,
  parameter bit FEEDBACK = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load,
  output logic shift,
  output logic acc_clr,
  output logic msb_sel,
  output logic cap,
  output logic wb,
  output logic busy
);
  localparam int CNTW = (G > 1) ? $clog2(G) : 1;

  da_state_e        state;
  logic [CNTW-1:0]  cnt;
  logic             last;

  always_comb begin
    last     = (state == ST_RUN) && (cnt == CNTW'(G - 1));
    in_ready = (state == ST_IDLE) || (FEEDBACK ? (state == ST_WB) : last);
    load     = in_valid && in_ready;
    shift    = (state == ST_RUN);
    acc_clr  = load;
    msb_sel  = last;
    cap      = last;
    wb       = (state == ST_WB);
    busy     = (state != ST_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (load) begin
          state <= ST_RUN;
          cnt   <= '0;
        end
        ST_RUN: begin
          if (!last) begin
            cnt <= cnt + 1'b1;
          end else if (FEEDBACK) begin
            state <= ST_WB;
          end else if (load) begin
            cnt <= '0;
          end else begin
            state <= ST_IDLE;
          end
        end
        ST_WB: begin
          cnt   <= '0;
          state <= load ? ST_RUN : ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A sample is never taken in the middle of a computation.
  assert property (@(posedge clk) disable iff (!rst_n)
                   load |-> (state != ST_RUN) || last);
endmodule
