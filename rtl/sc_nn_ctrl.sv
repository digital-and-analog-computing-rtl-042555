// sc_nn_ctrl: phase sequencer for the two-layer stochastic network.
// On start it runs: one discharge cycle (dis1 = dis2 = 1), STREAM_LEN cycles
// in which the hidden activation functions integrate (en1 = 1, output layer
// held discharged), STREAM_LEN cycles in which the hidden layer passes its
// streams while the output layer integrates (en2 = 1), and STREAM_LEN cycles
// in which the output streams are valid (out_valid = 1). done pulses for one
// cycle after that, 3*STREAM_LEN + 2 cycles after start was seen. start is
// ignored while busy. The sequencing is this design's choice; the document
// names the EN and DIS signals but not what drives them.
module sc_nn_ctrl #(
  parameter int unsigned STREAM_LEN = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en1,
  output logic dis1,
  output logic en2,
  output logic dis2,
  output logic out_valid,
  output logic done,
  output logic busy
);
  typedef enum logic [2:0] {S_IDLE, S_DIS, S_L1, S_L2, S_OUT, S_DONE} state_e;

  state_e                          state;
  logic [$clog2(STREAM_LEN)-1:0]   cnt;
  logic                            last;

  assign last = (cnt == $bits(cnt)'(STREAM_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_DIS;
        S_DIS:  begin state <= S_L1; cnt <= '0; end
        S_L1:   begin cnt <= last ? '0 : cnt + 1'b1; if (last) state <= S_L2;  end
        S_L2:   begin cnt <= last ? '0 : cnt + 1'b1; if (last) state <= S_OUT; end
        S_OUT:  begin cnt <= last ? '0 : cnt + 1'b1; if (last) state <= S_DONE; end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    en1       = (state == S_L1);
    en2       = (state == S_L2);
    dis1      = (state == S_DIS);
    dis2      = (state == S_DIS) || (state == S_L1);
    out_valid = (state == S_OUT);
    done      = (state == S_DONE);
    busy      = (state != S_IDLE);
  end
endmodule
