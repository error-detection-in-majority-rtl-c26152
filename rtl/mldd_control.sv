// mldd_control - sequencer of the majority-logic decoder with early error
// detection.
//
// States: IDLE (ready_o high; a start_i loads the shift register and clears
// the detector), RUN (one shift-and-correct cycle per clock) and DONE (one
// cycle with done_o high, result stable). In the first DETECT_CYCLES RUN
// cycles sample_o lets the error detector watch the check sums. At the last
// of those cycles the controller looks at error_now_i: if no check sum was
// ever nonzero the word is error-free and it goes to DONE with early_o set,
// skipping the other N-DETECT_CYCLES cycles; otherwise it runs all N cycles,
// so every bit passes the majority gate once.
//
// Timing, counted from the cycle in which start_i is accepted: done_o is high
// DETECT_CYCLES+1 cycles later for an error-free word and N+1 cycles later
// otherwise. The early stop after three cycles is the document's; the
// handshake and state encoding are this design's choices.
module mldd_control #(
  parameter int N             = 15,
  parameter int DETECT_CYCLES = 3,
  localparam int CW           = $clog2(N + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic ready_o,
  input  logic error_now_i,
  output logic load_o,
  output logic shift_o,
  output logic sample_o,
  output logic done_o,
  output logic early_o
);
  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;

  state_e        state;
  logic [CW-1:0] cnt;   // shifts already performed in this decode

  assign ready_o  = (state == IDLE);
  assign load_o   = ready_o & start_i;
  assign shift_o  = (state == RUN);
  assign sample_o = shift_o & (int'(cnt) < DETECT_CYCLES);
  assign done_o   = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      early_o <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start_i) begin
          state   <= RUN;
          cnt     <= '0;
          early_o <= 1'b0;
        end
        RUN: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == DETECT_CYCLES - 1 && DETECT_CYCLES < N && !error_now_i) begin
            state   <= DONE;
            early_o <= 1'b1;
          end else if (int'(cnt) == N - 1) begin
            state <= DONE;
          end
        end
        DONE:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
