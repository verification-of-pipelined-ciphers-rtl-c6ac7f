// Controller of the non-pipelined WG cipher (thesis Sec. 4.1.3, Fig. 4.4).
//
// Three states encoded as {init, load}: REG_LOAD = 01, INIT_PHASE = 10,
// RUN_PHASE = 00. A cycle counter cnt starts at 0 in REG_LOAD and counts every
// cycle; at cnt = 10 (11 load cycles) the machine enters INIT_PHASE, at
// cnt = 54 (44 initialization cycles) RUN_PHASE, where it stays and the
// counter stops. rst = 1 returns to REG_LOAD with cnt = 0 from any state.
//
// Ports: clk, rst (synchronous, active high) -> init, load, state.
module wg_fsm
  import wg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output logic       init,
  output logic       load,
  output logic [1:0] state
);
  typedef enum logic [1:0] {
    REG_LOAD   = 2'b01,
    INIT_PHASE = 2'b10,
    RUN_PHASE  = 2'b00
  } state_t;

  state_t     st;
  logic [5:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= REG_LOAD;
      cnt <= '0;
    end else begin
      unique case (st)
        REG_LOAD: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd10) st <= INIT_PHASE;
        end
        INIT_PHASE: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd54) st <= RUN_PHASE;
        end
        RUN_PHASE: ;
        default: st <= REG_LOAD;
      endcase
    end
  end

  assign {init, load} = st;
  assign state        = st;
endmodule
