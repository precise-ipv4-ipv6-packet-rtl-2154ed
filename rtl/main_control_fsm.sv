// Main control FSM: sets up every block of the generator for the selected
// mode of operation and follows their feedback.
//
// States: S_NIC (idle; the card acts as a standard network interface card),
// S_GEN (synthetic generation), S_LOAD (storing host or network traffic in
// the DDR2 memory), S_REPLAY (replay of stored traffic) and S_FINISH (the
// last frames of a run drain through the packet limiter before the routing
// returns to S_NIC). A start pulse in S_NIC enters the mode held in
// req_mode; MODE_NIC as request leaves the FSM in S_NIC.
//   S_GEN    ends when the completer reports done or on stop;
//   S_LOAD   ends on stop or when the memory is full;
//   S_REPLAY ends when the memory reader has delivered the last word.
// Outputs: route (mode of the switching logic and the limiter input
// multiplexer), gen_en, the two kinds of limitation (timestamp limitation
// only in replay of traffic that carries timestamps; rate limitation in
// generation and replay when requested), ts_gen_en (the timestamp unit must
// run when timestamps are compared), and wr_start/rd_start pulses for the
// memory reader/writer (combinational, in the clock of the start pulse). The set of modes, what the FSM controls and the
// choice of limitation follow the generator's description; the state split
// and the end conditions are this design's choice.
module main_control_fsm
  import pg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       stop,
  input  pg_mode_e   req_mode,
  input  logic       ts_present,
  input  logic       rate_req,
  // feedback
  input  logic       gen_done,
  input  logic       gen_idle,
  input  logic       mem_full,
  input  logic       rd_busy,
  input  logic       lim_empty,
  // control
  output pg_mode_e   route,
  output logic       gen_en,
  output logic       lim_ts_en,
  output logic       lim_rate_en,
  output logic       ts_gen_en,
  output logic       wr_start,
  output logic       rd_start,
  output logic       busy,
  output logic [2:0] state_code
);

  typedef enum logic [2:0] {
    S_NIC = 3'd0, S_GEN = 3'd1, S_LOAD = 3'd2, S_REPLAY = 3'd3, S_FINISH = 3'd4
  } state_e;

  state_e   state;
  pg_mode_e run_mode;
  logic     ts_q, rate_q, rd_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_NIC;
      run_mode <= MODE_NIC;
      ts_q     <= 1'b0;
      rate_q   <= 1'b0;
      rd_seen  <= 1'b0;
    end else begin
      case (state)
        S_NIC: if (start) begin
          run_mode <= req_mode;
          ts_q     <= ts_present;
          rate_q   <= rate_req;
          rd_seen  <= 1'b0;
          case (req_mode)
            MODE_GEN:                     state <= S_GEN;
            MODE_LOAD_HOST, MODE_LOAD_NET: state <= S_LOAD;
            MODE_REPLAY:                  state <= S_REPLAY;
            default:                      run_mode <= MODE_NIC;
          endcase
        end
        S_GEN:    if (gen_done || stop) state <= S_FINISH;
        S_LOAD:   if (stop || mem_full) state <= S_FINISH;
        S_REPLAY: begin
          if (rd_busy) rd_seen <= 1'b1;
          if (rd_seen && !rd_busy) state <= S_FINISH;
        end
        S_FINISH: if (gen_idle && lim_empty) begin
          state    <= S_NIC;
          run_mode <= MODE_NIC;
        end
        default: state <= S_NIC;
      endcase
    end
  end

  // the memory pointers are reset in the same clock as the routing changes,
  // so that the first beat of a load lands at address 0
  always_comb begin
    wr_start    = (state == S_NIC) && start &&
                  (req_mode == MODE_LOAD_HOST || req_mode == MODE_LOAD_NET);
    rd_start    = (state == S_NIC) && start && (req_mode == MODE_REPLAY);
    route       = run_mode;
    gen_en      = (state == S_GEN);
    lim_ts_en   = (run_mode == MODE_REPLAY) && ts_q;
    lim_rate_en = ((run_mode == MODE_GEN) || (run_mode == MODE_REPLAY)) && rate_q;
    ts_gen_en   = lim_ts_en;
    busy        = (state != S_NIC);
    state_code  = state;
  end

endmodule
