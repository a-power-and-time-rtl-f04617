// Reconfiguration manager for the partially reconfigurable region (PRR).
//
// Software asks for a module (bypass, filter bank or channel filter) and
// gives the length of its partial bitstream in 32-bit words. The manager
// decouples the PRR, copies the bitstream arriving from DMA into the
// configuration port one word per cycle, and when the last word is
// written switches the live module and holds decouple one more cycle so
// the newly loaded module starts from a cleared state. Loading modules
// only when they are needed, under software control, follows the
// architecture; the streaming form, the ICAP-style port (active-low
// enable and write strobe) and the length register are this design's
// choices.
//
// Interface: req is taken only when not busy. bs_valid/bs_ready/bs_data is
// the bitstream stream. icap_csib/icap_rdwrb/icap_i are registered, one
// cycle behind the accepted word. done pulses when mode has changed.
module reconfig_ctrl
  import ldacs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  prr_mode_e   req_mode,
  input  logic [23:0] req_words,
  input  logic        bs_valid,
  output logic        bs_ready,
  input  logic [31:0] bs_data,
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  output prr_mode_e   mode,
  output logic        decouple,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {R_IDLE, R_LOAD, R_SWITCH} rstate_e;

  rstate_e     state;
  prr_mode_e   next_mode;
  logic [23:0] left;

  assign busy     = (state != R_IDLE);
  assign bs_ready = (state == R_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= R_IDLE;
      mode       <= MODE_BYPASS;
      next_mode  <= MODE_BYPASS;
      left       <= '0;
      decouple   <= 1'b0;
      done       <= 1'b0;
      icap_csib  <= 1'b1;
      icap_rdwrb <= 1'b1;
      icap_i     <= '0;
    end else begin
      done       <= 1'b0;
      icap_csib  <= 1'b1;
      icap_rdwrb <= 1'b1;
      unique case (state)
        R_IDLE: if (req) begin
          next_mode <= req_mode;
          left      <= req_words;
          decouple  <= 1'b1;
          state     <= (req_words == '0) ? R_SWITCH : R_LOAD;
        end
        R_LOAD: if (bs_valid) begin
          icap_csib  <= 1'b0;
          icap_rdwrb <= 1'b0;
          icap_i     <= bs_data;
          left       <= left - 1'b1;
          if (left == 24'd1) state <= R_SWITCH;
        end
        R_SWITCH: begin
          mode     <= next_mode;
          decouple <= 1'b1;
          done     <= 1'b1;
          state    <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
      if (state == R_IDLE && !req) decouple <= 1'b0;
    end
  end

endmodule
