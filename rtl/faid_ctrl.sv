// faid_ctrl: sequencing of the column-serial decoder.
//
// A start pulse in IDLE clears the check states (clear=1 for that cycle)
// and enters RUN. In RUN the controller presents one group of NPC column
// blocks per cycle: col = 0, NPC, ..., NB-NPC is the first block of the
// group, fold=1, and last=1 on the final group of a pass. Pass 0 reads
// all-zero check messages, so it only forms the initial messages and checks
// the syndrome of the channel word; pass n>0 is iteration n. At the end of a
// pass, a zero syndrome (syn_zero_next) ends the frame with success=1 and
// iterations=n; otherwise pass MAX_ITER ends it with success=0 and
// iterations=MAX_ITER. done pulses for one cycle when the frame ends; busy
// is high from the start pulse until then. NB must be a multiple of NPC.
//
// Timing: done rises (NB/NPC)*(iterations+1) cycles after the clock edge that
// samples start. The iteration limit and the early stop follow the
// document's latency measurements; the exact timing is this design's.
module faid_ctrl #(
  parameter int NB       = 64,
  parameter int NPC      = 1,
  parameter int MAX_ITER = 20,
  parameter int CW       = (NB > 1) ? $clog2(NB) : 1,
  parameter int IW       = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          syn_zero_next,
  output logic          clear,
  output logic          fold,
  output logic          last,
  output logic [CW-1:0] col,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iterations
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;

  state_t        state;
  logic [IW-1:0] pass;

  assign fold  = (state == S_RUN);
  assign last  = fold && (int'(col) == NB - NPC);
  assign clear = (state == S_IDLE) && start;
  assign busy  = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      col        <= '0;
      pass       <= '0;
      done       <= 1'b0;
      success    <= 1'b0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN;
            col   <= '0;
            pass  <= '0;
          end
        end
        S_RUN: begin
          if (last) begin
            col <= '0;
            if (syn_zero_next || int'(pass) == MAX_ITER) begin
              state      <= S_IDLE;
              done       <= 1'b1;
              success    <= syn_zero_next;
              iterations <= pass;
            end else begin
              pass <= pass + 1'b1;
            end
          end else begin
            col <= col + CW'(NPC);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
