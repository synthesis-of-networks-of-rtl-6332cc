// pe_controller: instruction RAM and sequencer of one custom PE.
//
// The PE runs a static schedule: every clock cycle the controller reads one
// control word from its instruction RAM and drives it to the data RAM, the
// input mux, the constant ROM and the output register. As in the document
// there is no decoding and no jump; the program counter only increments and
// returns to 0 after a word marked `wrap`.
//
// Synchronisation: a word marked `sync` or `step_end` is a barrier. After
// issuing it the controller issues no-ops and raises at_sync until the
// network-wide all_sync (the AND of every PE's at_sync) is seen, then resumes
// on the next cycle; all PEs therefore leave a barrier in the same cycle.
// A word marked `step_end` also ends a time step; after num_steps steps the
// controller leaves its barrier into idle and pulses done.
//
// Interface: start (one-cycle pulse while idle) begins a run at address 0.
// prog_we/prog_addr/prog_data write the instruction RAM (host loading, only
// while idle). cw is the word issued this cycle (all zero = no-op). The
// barrier scheme, step counting and loading port are this design's choices.
module pe_controller
  import ode_pkg::*;
#(
  parameter int INST_DEPTH = 2**INST_AW,
  localparam int IAW       = $clog2(INST_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [15:0]     num_steps,
  input  logic            all_sync,
  output logic            at_sync,
  output logic            busy,
  output logic            done,
  output logic [15:0]     steps_done,
  output ctrl_word_t      cw,
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  ctrl_word_t      prog_data
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;

  ctrl_word_t     imem [INST_DEPTH];
  state_e         state;
  logic [IAW-1:0] pc;
  logic           last_step;

  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_data;
  end

  assign cw      = (state == S_RUN) ? imem[pc] : '0;
  assign at_sync = (state == S_WAIT);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      steps_done <= '0;
      last_step  <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= (num_steps == 0) ? S_IDLE : S_RUN;
          done       <= (num_steps == 0);
          pc         <= '0;
          steps_done <= '0;
          last_step  <= 1'b0;
        end
        S_RUN: begin
          pc <= cw.wrap ? '0 : pc + 1'b1;
          if (cw.step_end) begin
            steps_done <= steps_done + 1'b1;
            last_step  <= (steps_done + 1'b1 == num_steps);
          end
          if (cw.sync || cw.step_end) state <= S_WAIT;
        end
        S_WAIT: if (all_sync) begin
          state <= last_step ? S_IDLE : S_RUN;
          done  <= last_step;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The host may only load the program while the PE is idle.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) prog_we |-> !busy);

endmodule
