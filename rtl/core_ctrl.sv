// core_ctrl: start/stop controller of one accelerator core.
//
// The CPU starts a core once per sequence (one scan area) by writing the
// control register, then polls for done. The controller
//   * on a start command loads the AGUs and enters RUN;
//   * keeps track of top, the row slot that holds logical row 0 of the
//     current scan area: a "first sequence" start sets it to 0; any other
//     start advances it by one (mod W_H), because between two sequences the
//     CPU overwrites the obsolete top row with the new bottom row;
//   * holds the whole data path (en low) in any cycle in which the bus
//     accesses this core, so the core pauses while data are transferred to
//     or from it;
//   * leaves RUN when the result of the last window has been written, raising
//     done (held until the next start) and latching the run's cycle count.
// Ports: cmd_start/cmd_first from the register interface, pause from the bus,
// fin_wr from the data path (last result written this cycle).
// Start commands that arrive while busy are ignored.
// Starting, stopping and the pause follow the document's schedule; the
// command encoding, the row pointer and the cycle counter are this design's.
module core_ctrl #(
  parameter int unsigned W_H = 16,
  localparam int unsigned TW = $clog2(W_H)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_start,
  input  logic          cmd_first,
  input  logic          pause,
  input  logic          fin_wr,
  output logic          agu_start,
  output logic          en,
  output logic          busy,
  output logic          done,
  output logic [TW-1:0] top,
  output logic [31:0]   cycles
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  assign en        = !pause;
  assign busy      = (state == S_RUN);
  assign agu_start = cmd_start && (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      top    <= '0;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_start) begin
          state  <= S_RUN;
          done   <= 1'b0;
          cycles <= '0;
          if (cmd_first)                  top <= '0;
          else if (32'(top) == W_H - 1)   top <= '0;
          else                            top <= top + 1'b1;
        end
        S_RUN: begin
          cycles <= cycles + 1;
          if (fin_wr) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The data path reports completion only while a run is in progress.
  a_fin_in_run: assert property (@(posedge clk) disable iff (!rst_n) fin_wr |-> busy);

endmodule
