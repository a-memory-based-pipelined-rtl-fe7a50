// Memory scheduler. The six memory modules rotate through five operations
// (write input, decide edge directions, filter the left/right block borders,
// filter the top/bottom block borders, read output) and one idle step, each
// module one step behind the previous, so that in every step each of the
// five units works on exactly one module. The step counter names the module
// receiving input; operation k works on module (that - k) mod 6.
//
// A step starts with a one-cycle start pulse and ends when every unit
// reports done, so a slow input or a stalled output lengthens the step.
// Every module carries a valid flag (it holds a strip) and the strip's
// position in the frame (first / last strip), which the filters use to
// replicate rows at the top and bottom picture edge. Inside a frame the
// write operation always runs and waits for input; after the last strip of a
// frame, a step whose start finds no input is an empty ("bubble") step, so
// the pipeline drains between frames without any flush input.
// Timing: start[k] is high for the first cycle of a step when operation k
// has work; done[k] must be high whenever unit k is idle.
// The five operations, the six modules and their staggered rotation follow
// the architecture; the idle sixth step, the done-based step length, the
// empty steps and the frame flags are this design's own.
module scheduler
  import bre_pkg::*;
#(
  parameter int STRIPS = 135   // strips (8-line groups) per frame
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [NOPS-1:0]     done,
  output mod_idx_t [NOPS-1:0] mod_op,
  output logic [NOPS-1:0]     start,
  output logic [NOPS-1:0]     first,    // strip of operation k is the first of its frame
  output logic [NOPS-1:0]     last,     // ... the last of its frame
  output logic                bubble    // start of a step without input
);
  typedef enum logic {S_START, S_RUN} state_t;

  state_t              state;
  mod_idx_t            wmod;            // module written in this step
  logic [NMOD-1:0]     mvalid, mfirst, mlast;
  logic [$clog2(STRIPS+1)-1:0] strip;   // frame index of the next strip to write
  logic                act0;
  logic [NOPS-1:0]     act;

  always_comb begin
    for (int k = 0; k < NOPS; k++)
      mod_op[k] = mod_idx_t'((int'(wmod) + NMOD - k) % NMOD);
  end

  assign act0 = (strip != '0) || in_valid;
  always_comb begin
    act[0] = act0;
    for (int k = 1; k < NOPS; k++) act[k] = mvalid[mod_op[k]];
  end

  assign start  = (state == S_START) ? act : '0;
  assign bubble = (state == S_START) && !act0;

  always_comb begin
    for (int k = 0; k < NOPS; k++) begin
      first[k] = mfirst[mod_op[k]];
      last[k]  = mlast[mod_op[k]];
    end
    first[0] = (strip == '0);
    last[0]  = (int'(strip) == STRIPS - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_START;
      wmod   <= '0;
      mvalid <= '0;
      mfirst <= '0;
      mlast  <= '0;
      strip  <= '0;
    end else begin
      case (state)
        S_START: begin
          mvalid[wmod] <= act0;
          mfirst[wmod] <= (strip == '0);
          mlast[wmod]  <= (int'(strip) == STRIPS - 1);
          if (act0) strip <= (int'(strip) == STRIPS - 1) ? '0 : strip + 1'b1;
          state <= S_RUN;
        end
        S_RUN: begin
          if (&done) begin
            wmod  <= (int'(wmod) == NMOD - 1) ? '0 : wmod + 1'b1;
            state <= S_START;
          end
        end
        default: state <= S_START;
      endcase
    end
  end
endmodule
