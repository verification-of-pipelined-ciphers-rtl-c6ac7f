// Pipelined KASUMI block cipher with 8, 16 or 32 stages.
//
// The eight KASUMI rounds are written as 32 micro-steps: each round is one FL
// step and three FI steps (the three rounds of FO), in the order FL,FI,FI,FI
// for odd rounds and FI,FI,FI,FL for even rounds. A stage register sits in
// front of every (32/STAGES)-th micro-step:
//   STAGES = 8  : registers A at the start of every round,
//   STAGES = 16 : plus registers B between FL and FO,
//   STAGES = 32 : plus registers C inside FO, so each stage holds one FL or FI.
// This is the register placement of the thesis (Sec. 3.3); its stage
// contents are pure datapath, so the pipeline accepts one block per clock and
// never stalls.
//
// Each stage register holds {valid, key, L_{i-1}, R_{i-1}, w}, where w is the
// partly computed round function. The 128-bit key travels with its block and
// every round derives its own subkeys from it, so blocks with different keys
// may follow each other back to back (the thesis does not say how the
// subkeys reach the stages; carrying the key is this design's choice).
//
// Ports: clk, rst (synchronous, active high, clears the valid bits),
// in_valid/din (64)/key (128) -> out_valid/dout (64).
// Timing: a block presented in cycle t appears at dout with out_valid in
// cycle t + STAGES; throughput one block per cycle.
// Lint note: the last step's key and half-round word are not needed at the
// output, so a linter reports those bits of step_out as unused; they are
// removed in synthesis.
module kasumi_pipe
  import kasumi_pkg::*;
#(
  parameter int unsigned STAGES = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [63:0]  din,
  input  logic [127:0] key,
  output logic         out_valid,
  output logic [63:0]  dout
);
  localparam int unsigned STEPS = 32;
  localparam int unsigned SPAN  = STEPS / STAGES;   // micro-steps per stage

  initial begin
    assert (STAGES == 8 || STAGES == 16 || STAGES == 32)
      else $error("kasumi_pipe: STAGES must be 8, 16 or 32");
  end

  typedef struct packed {
    logic         valid;
    logic [127:0] key;
    logic [31:0]  lprev;   // L_{i-1}
    logic [31:0]  rprev;   // R_{i-1}
    logic [31:0]  w;       // round-function value in progress
  } slot_t;

  for (genvar m = 0; m < STEPS; m++) begin : g_step
    localparam int R = m / 4;          // round index 0..7 (round R+1)
    localparam int S = m % 4;          // position inside the round
    localparam bit ODD_ROUND = (R % 2 == 0);
    localparam bit IS_FL = ODD_ROUND ? (S == 0) : (S == 3);
    localparam int FI_J  = ODD_ROUND ? S - 1 : S;   // FO sub-round 0..2

    slot_t prev;       // value handed over by the previous micro-step
    slot_t step_in;    // value entering this micro-step (after any register)
    slot_t step_out;   // value leaving this micro-step

    if (m == 0) begin : g_src_in
      assign prev = '{valid: in_valid, key: key, lprev: din[63:32], rprev: din[31:0], w: din[63:32]};
    end else begin : g_src_step
      assign prev = g_step[m-1].step_out;
    end

    if (m % SPAN == 0) begin : g_reg
      slot_t q;
      always_ff @(posedge clk) begin
        if (rst) q.valid <= 1'b0;
        else     q.valid <= prev.valid;
        q.key   <= prev.key;
        q.lprev <= prev.lprev;
        q.rprev <= prev.rprev;
        q.w     <= prev.w;
      end
      assign step_in = q;
    end else begin : g_wire
      assign step_in = prev;
    end

    round_key_t rk [8];
    kasumi_keysched u_ks (.key(step_in.key), .rk(rk));

    logic [31:0] w_eff, w_new;
    assign w_eff = (S == 0) ? step_in.lprev : step_in.w;

    if (IS_FL) begin : g_fl
      kasumi_fl u_fl (.din(w_eff), .kl(rk[R].kl), .dout(w_new));
    end else begin : g_fi
      logic [15:0] fi_out;
      kasumi_fi u_fi (.din(w_eff[31:16] ^ rk[R].ko[47-16*FI_J -: 16]),
                      .ki(rk[R].ki[47-16*FI_J -: 16]), .dout(fi_out));
      assign w_new = {w_eff[15:0], fi_out ^ w_eff[15:0]};
    end

    always_comb begin
      step_out   = step_in;
      step_out.w = w_new;
      if (S == 3) begin
        step_out.lprev = step_in.rprev ^ w_new;   // L_i = R_{i-1} ^ f
        step_out.rprev = step_in.lprev;           // R_i = L_{i-1}
      end
    end
  end

  assign out_valid = g_step[STEPS-1].step_out.valid;
  assign dout      = {g_step[STEPS-1].step_out.lprev, g_step[STEPS-1].step_out.rprev};
endmodule
