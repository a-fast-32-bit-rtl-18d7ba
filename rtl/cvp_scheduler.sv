// cvp_scheduler: process scheduler and micro-sequencer of a CVP node.
//
// While idle it watches the input queue. When a header is at the queue head
// it looks the header's tag up in the hash table and waits until the input
// queue holds the header plus the process's input words and the output queue
// has room for a header plus its output words. Then, in one clock, it
// consumes the header, writes the modified header to the output queue and
// presents the process's start address to the writeable control store.
// From the next clock it runs: the WCS word for the current address is
// valid (`uword_valid`), the sequencer steps the address by one each clock,
// and the word whose `last` bit is set ends the process and returns the
// scheduler to idle. Because the block is complete and the space reserved
// before starting, a process never stalls part-way.
//
// Outputs `wait_data` and `wait_space` show why an available block is held
// back. `done` pulses with the last word of each process. Straight-line
// sequencing (no branches or loops) is this design's choice: the document
// describes code as in-line micro-code assembled from primitives.
module cvp_scheduler
  import cvp_pkg::*;
  import cvp_node_pkg::*;
#(
  parameter int QCNT_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // input queue
  input  logic              iq_empty,
  input  logic [QCNT_W-1:0] iq_count,
  output logic              hdr_pop,
  // output queue
  input  logic [QCNT_W-1:0] oq_free,
  output logic              hdr_push,
  // hash table lookup of the header at the input queue head
  input  hash_entry_t       entry,
  // control store
  output logic [WCS_AW-1:0] wcs_raddr,
  input  logic              uword_last,
  output logic              uword_valid,
  // status
  output logic              busy,
  output logic              wait_data,
  output logic              wait_space,
  output logic              done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e            state_q;
  logic [WCS_AW-1:0] pc_q;
  logic              data_ok, space_ok, start;

  always_comb begin
    data_ok    = !iq_empty && (32'(iq_count) >= 32'(entry.in_words) + 1);
    space_ok   = 32'(oq_free) >= 32'(entry.out_words) + 1;
    start      = (state_q == S_IDLE) && data_ok && space_ok;
    wait_data  = (state_q == S_IDLE) && !iq_empty && !data_ok;
    wait_space = (state_q == S_IDLE) && data_ok && !space_ok;
    hdr_pop    = start;
    hdr_push   = start;
    uword_valid = (state_q == S_RUN);
    busy       = (state_q == S_RUN);
    done       = (state_q == S_RUN) && uword_last;
    wcs_raddr  = (state_q == S_IDLE) ? entry.start : pc_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_RUN;
          pc_q    <= entry.start;
        end
        S_RUN: begin
          pc_q <= pc_q + 1'b1;
          if (uword_last) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
