// pci_ack: fixed-latency acknowledgement for the PCI backside interface.
//
// Watches the active-low read and write strobes of the PCI target. When
// either is asserted the controller waits ACK_DELAY cycles, asserts the
// matching acknowledgement (rd_ack_l or wr_ack_l, active low) for exactly
// one cycle, and then waits until both strobes are released before it
// accepts the next transaction, so acknowledgements are always inactive
// between transactions and never in the first cycle of a strobe. The
// three-cycle delay and the single-cycle acknowledgement follow the
// specification.
module pci_ack #(
  parameter int ACK_DELAY = 3
) (
  input  logic clk,
  input  logic reset_l,
  input  logic rd_l,
  input  logic wr_l,
  output logic rd_ack_l,
  output logic wr_ack_l
);
  typedef enum logic [1:0] {A_IDLE, A_DELAY, A_ACK, A_WAIT} state_e;
  state_e st;
  logic [3:0] cnt;
  logic       is_rd;

  always_ff @(posedge clk or negedge reset_l) begin
    if (!reset_l) begin
      st <= A_IDLE; cnt <= '0; is_rd <= 1'b0; rd_ack_l <= 1'b1; wr_ack_l <= 1'b1;
    end else begin
      rd_ack_l <= 1'b1; wr_ack_l <= 1'b1;
      case (st)
        A_IDLE: if (!rd_l || !wr_l) begin
          is_rd <= !rd_l; cnt <= 4'd1; st <= A_DELAY;
        end
        A_DELAY: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(ACK_DELAY - 1)) begin
            st <= A_ACK;
            if (is_rd) rd_ack_l <= 1'b0; else wr_ack_l <= 1'b0;
          end
        end
        A_ACK:  st <= (rd_l && wr_l) ? A_IDLE : A_WAIT;
        A_WAIT: if (rd_l && wr_l) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
