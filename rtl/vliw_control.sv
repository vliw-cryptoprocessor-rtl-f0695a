// vliw_control: control unit and instruction fetch.
//
// A small state machine runs the three global pipeline stages:
//   stage 1 fetch/dispatch - IPC addresses the I-CACHE (synchronous read),
//   stage 2 decode/execute - the word arrives and the units execute it,
//   stage 3 write-back     - registers and D-CACHE are written.
// Every stage takes one cycle and the pipeline never stalls, so a program of
// N words that ends with the halt word finishes 3 cycles after its last word
// is fetched. States: IDLE (waiting for `start`), RUN (fetching one word per
// cycle), DRAIN (fetch stopped after the halt word and its delay slot, the
// pipeline empties) and DONE. A taken branch redirects IPC at the end of its
// execute cycle; the word fetched in that cycle (the delay slot) still runs.
// The three stages and the stall-free pipeline follow the architecture; the
// start/halt protocol and the delay slot are this design's choices.
module vliw_control
  import vliw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,          // pulse: begin at start_addr (IDLE or DONE)
  input  addr_t start_addr,
  input  logic  taken,          // branch taken in the execute stage
  input  addr_t target,
  input  logic  halt,           // halt word in the execute stage
  output logic  imem_re,
  output addr_t imem_addr,
  output addr_t ipc,            // address of the next word to fetch
  output logic  s2_valid,       // execute stage holds a word
  output addr_t s2_pc,
  output logic  s3_valid,       // write-back stage holds a word
  output logic  busy,
  output logic  done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;

  assign imem_re   = (state == S_RUN);
  assign imem_addr = ipc;
  assign busy      = (state == S_RUN) || (state == S_DRAIN);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ipc      <= '0;
      s2_valid <= 1'b0;
      s2_pc    <= '0;
      s3_valid <= 1'b0;
    end else begin
      s3_valid <= s2_valid;
      case (state)
        S_IDLE, S_DONE: begin
          s2_valid <= 1'b0;
          if (start) begin
            ipc   <= start_addr;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          s2_valid <= 1'b1;
          s2_pc    <= ipc;
          ipc      <= (s2_valid && taken) ? target : ipc + addr_t'(1);
          if (s2_valid && halt) state <= S_DRAIN;
        end
        S_DRAIN: begin
          s2_valid <= 1'b0;
          if (!s2_valid && !s3_valid) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A halt can only be seen while the pipeline is running.
  assert property (@(posedge clk) disable iff (!rst_n) halt |-> s2_valid);
endmodule
