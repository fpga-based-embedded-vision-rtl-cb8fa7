// eyelink_if: one EyeLink flow-control link between a sending and a receiving
// block.
//
// The sender raises el_ready_to_send while el_data holds a valid word; the
// receiver raises el_ack_data while it can take a word. A word moves on every
// rising clock edge at which both are high (signal `xfer`). This lets blocks
// with different data rates be chained: a busy receiver simply holds
// el_ack_data low and the sender waits.
//
// The handshake itself follows the EyeLink protocol. Two rules are this
// design's own and are checked by the assertions below: a sender that has
// raised el_ready_to_send keeps it raised, with el_data unchanged, until the
// word is taken; and el_ack_data may be high with no word offered (it then
// has no effect). Receivers in this design derive el_ack_data only from their
// own state, never from el_ready_to_send, so a chain has no combinational
// loop.
interface eyelink_if #(
  parameter int unsigned W = 24
) (
  input logic clk,
  input logic rst_n
);
  logic         el_ready_to_send;
  logic         el_ack_data;
  logic [W-1:0] el_data;
  logic         xfer;

  assign xfer = el_ready_to_send & el_ack_data;

  modport sender   (output el_ready_to_send, output el_data, input el_ack_data);
  modport receiver (input el_ready_to_send, input el_data, output el_ack_data);
  modport monitor  (input el_ready_to_send, input el_data, input el_ack_data, input xfer);

  // An offered word is neither withdrawn nor changed before it is taken.
  a_hold_rts: assert property (@(posedge clk) disable iff (!rst_n)
                               el_ready_to_send && !el_ack_data |=> el_ready_to_send)
    else $error("eyelink: el_ready_to_send dropped before el_ack_data");
  a_hold_data: assert property (@(posedge clk) disable iff (!rst_n)
                                el_ready_to_send && !el_ack_data |=> $stable(el_data))
    else $error("eyelink: el_data changed while waiting for el_ack_data");
endinterface
