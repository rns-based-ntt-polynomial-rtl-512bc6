// nwc_ctrl: outer-layer sequencer of the negative wrapped convolution.
//
// After 'start' it walks through the steps of the RNS polynomial product
// (inputs already converted to RNS in banks A and B):
//   HAD_A_PHI   A[i] <- A[i] * phi^i          (RNS Hadamard)
//   HAD_B_PHI   B[i] <- B[i] * phi^i
//   NTT_A       A <- NTT(A)                   (RNS NTT unit)
//   NTT_B       B <- NTT(B)
//   HAD_AB      A[i] <- A[i] * B[i]
//   INTT_A      A <- INTT(A)
//   HAD_NINV    A[i] <- A[i] * n^-1
//   HAD_PHIINV  A[i] <- A[i] * phi^-i
//   REV         result[i] <- reverse-convert(A[i])
// For each step it raises 'go' for one cycle and waits for 'eng_done' from
// the engine the top routes that step to. One NTT unit serves all three
// transforms in sequence, as in the document's single-unit choice.
module nwc_ctrl
  import rns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  eng_done,
  output nwc_step_e step,
  output logic  go,
  output logic  busy,
  output logic  done
);
  logic wait_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step   <= ST_IDLE;
      go     <= 1'b0;
      wait_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      if (step == ST_IDLE) begin
        if (start) begin
          step   <= ST_HAD_A_PHI;
          go     <= 1'b1;
          wait_q <= 1'b1;
        end
      end else if (wait_q && eng_done) begin
        if (step == ST_REV) begin
          step   <= ST_IDLE;
          wait_q <= 1'b0;
          done   <= 1'b1;
        end else begin
          step <= nwc_step_e'(step + 1'b1);
          go   <= 1'b1;
        end
      end
    end
  end

  assign busy = (step != ST_IDLE);

  a_go_once: assert property (@(posedge clk) disable iff (!rst_n) go |=> !go);
endmodule
