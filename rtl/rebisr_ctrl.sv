// rebisr_ctrl: sequencer of the reconfigurable BISR.
//
// One MBIST and one BIRA are shared by NUM_RAMS RAMs.  A start pulse tests and
// repairs the RAMs one after another: for RAM ram_idx it drives cfg with that
// RAM's size and spare-cell count (rebisr_pkg::ram_cfg), pulses run for one
// cycle (starting MBIST and BIRA together) and waits for the BIRA's done.  It
// then latches the BIRA's sel into that RAM's mode bit (1: normal mode with
// the repair applied) and its repair_ok into repaired, and goes on to the next
// RAM.  After the last RAM, done rises and stays high until the next start.
// All mode bits are cleared at start, so every RAM is in test mode until its
// own repair has been loaded.
// Reconfiguring the shared MBIST and BIRA for each RAM in turn follows the
// design description; the order of the RAMs and this handshake are this
// design's choices.
module rebisr_ctrl
  import rebisr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic [1:0]          ram_idx,
  output ram_cfg_t            cfg,
  output logic                run,
  input  logic                bira_done,
  input  logic                bira_sel,
  input  logic                bira_ok,
  output logic [NUM_RAMS-1:0] mode,
  output logic [NUM_RAMS-1:0] repaired,
  output logic                done
);
  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_WAIT} state_t;
  state_t state;

  assign cfg = ram_cfg(int'(ram_idx));
  assign run = (state == C_LAUNCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      ram_idx  <= '0;
      mode     <= '0;
      repaired <= '0;
      done     <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          ram_idx  <= '0;
          mode     <= '0;
          repaired <= '0;
          done     <= 1'b0;
          state    <= C_LAUNCH;
        end
        C_LAUNCH: state <= C_WAIT;
        C_WAIT: if (bira_done) begin
          mode[ram_idx]     <= bira_sel;
          repaired[ram_idx] <= bira_ok;
          if (int'(ram_idx) == NUM_RAMS - 1) begin
            done  <= 1'b1;
            state <= C_IDLE;
          end else begin
            ram_idx <= ram_idx + 2'd1;
            state   <= C_LAUNCH;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
