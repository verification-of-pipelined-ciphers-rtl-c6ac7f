// Controller of the optimized WG cipher (thesis Sec. 4.3.3, Tables 5.2-5.5).
//
// Same three states and encoding as wg_fsm ({init, load}: REG_LOAD = 01,
// INIT_PHASE = 10, RUN_PHASE = 00), plus the chip enable ce of the LFSR and
// the data-valid d_valid into the eleven-stage WG core:
//   REG_LOAD  : ce = 1, d_valid = 0 for 11 cycles (cnt = 0..10).
//   INIT_PHASE: d_valid = 1 in the first cycle; afterwards d_valid follows
//               d_ready (the core's returned valid bit) one cycle later, and
//               ce = d_ready, so the LFSR shifts exactly when a feedback
//               word leaves the core. Each d_ready counts one packet in cnt2;
//               with the 44th the machine enters RUN_PHASE. This gives
//               44 x 12 = 528 initialization cycles.
//   RUN_PHASE : d_valid = 1 in the first cycle and then toggles every cycle;
//               ce is d_valid delayed by one cycle (0 in the first cycle),
//               matching the one-cycle latency of the LFSR's pipelined
//               gamma multiplier.
// The 44th d_ready moves the state in the same cycle as it is counted, so the
// initialization phase lasts exactly 528 cycles as the thesis' properties 7-8
// require; the counting style is this design's.
//
// Ports: clk, rst (synchronous, active high), d_ready -> init, load, ce,
// d_valid, state.
module wg_fsm_opt
  import wg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       d_ready,
  output logic       init,
  output logic       load,
  output logic       ce,
  output logic       d_valid,
  output logic [1:0] state
);
  typedef enum logic [1:0] {
    REG_LOAD   = 2'b01,
    INIT_PHASE = 2'b10,
    RUN_PHASE  = 2'b00
  } state_t;

  localparam int unsigned INIT_PACKETS = 44;

  state_t     st;
  logic [3:0] cnt;
  logic [5:0] cnt2;
  logic       dv_q, ce_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= REG_LOAD;
      cnt  <= '0;
      cnt2 <= '0;
      dv_q <= 1'b0;
      ce_q <= 1'b0;
    end else begin
      ce_q <= dv_q;
      unique case (st)
        REG_LOAD: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd10) begin
            st   <= INIT_PHASE;
            dv_q <= 1'b1;
          end
        end
        INIT_PHASE: begin
          dv_q <= d_ready;
          if (d_ready) begin
            cnt2 <= cnt2 + 6'd1;
            if (cnt2 == 6'(INIT_PACKETS - 1)) st <= RUN_PHASE;
          end
        end
        RUN_PHASE: dv_q <= ~dv_q;
        default: st <= REG_LOAD;
      endcase
    end
  end

  always_comb begin
    unique case (st)
      REG_LOAD:   ce = 1'b1;
      INIT_PHASE: ce = d_ready;
      default:    ce = ce_q;
    endcase
  end

  assign d_valid      = dv_q;
  assign {init, load} = st;
  assign state        = st;
endmodule
