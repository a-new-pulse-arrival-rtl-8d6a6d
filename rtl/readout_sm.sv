// readout_sm - readout State Machine between the HSF and the PCI controller.
//
// Two states. In S_TIME, when the FIFO holds an event and the PCI
// controller's add-on FIFO is not full, the event's 32-bit time mark is
// written (`pci_wr`, `pci_wdata`), the event is popped from the HSF
// (`fifo_rd`) and its second half, {status, channels}, is kept in a register;
// the machine moves to S_CHAN. In S_CHAN, when the PCI side is not full, the
// kept word is written and the machine returns to S_TIME. So an event costs
// two base cycles at full speed, the machine waits in either state while
// `pci_full` is high, and the PCI side always receives whole word pairs,
// even if the FIFO is cleared between the two words. Outputs are
// combinational from the state, the flags and the kept word.
//
// Reading the FIFO and feeding the PCI controller is from the original design; the
// two-word format is this design's choice. In the original design the state
// machine also decodes and compresses the data, but the scheme is not
// described; events are passed here uncompressed.
module readout_sm
  import patrm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_empty,
  input  event_t            fifo_data,
  output logic              fifo_rd,
  output logic [WORD_W-1:0] pci_wdata,
  output logic              pci_wr,
  input  logic              pci_full
);
  typedef enum logic {S_TIME, S_CHAN} state_t;
  state_t            state, state_n;
  logic [WORD_W-1:0] second;

  always_comb begin
    state_n   = state;
    fifo_rd   = 1'b0;
    pci_wr    = 1'b0;
    pci_wdata = fifo_data.tmc;
    unique case (state)
      S_TIME: begin
        if (!fifo_empty && !pci_full) begin
          pci_wr  = 1'b1;
          fifo_rd = 1'b1;
          state_n = S_CHAN;
        end
      end
      S_CHAN: begin
        pci_wdata = second;
        if (!pci_full) begin
          pci_wr  = 1'b1;
          state_n = S_TIME;
        end
      end
      default: state_n = S_TIME;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_TIME;
      second <= '0;
    end else begin
      state <= state_n;
      if (fifo_rd) second <= {fifo_data.status, fifo_data.channels};
    end
  end

  a_pop_only_when_data: assert property (@(posedge clk) disable iff (!rst_n)
                                         fifo_rd |-> !fifo_empty);
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         pci_wr |-> !pci_full);
endmodule
