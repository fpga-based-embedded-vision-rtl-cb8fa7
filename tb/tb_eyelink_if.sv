// tb_eyelink_if: self-checking testbench for the eyelink_if link.
//
// A sender with random idle cycles and a receiver with random busy cycles
// exchange 2000 words over one link. The receiver takes a word whenever the
// link's xfer signal is high. Checks: xfer equals el_ready_to_send AND
// el_ack_data in every cycle, every word arrives once and in order, and both
// the sender-waits and receiver-idle cases occur. The interface's own
// assertions check that the sender holds its word while waiting.
module tb_eyelink_if;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  int checks = 0;
  int failures = 0;

  eyelink_if #(.W(16)) link (.clk, .rst_n);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 2000;
  int sent = 0, rcvd = 0, waits = 0, idle_acks = 0;

  // Sender: offers word `sent`, holds it until it is taken.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link.el_ready_to_send <= 1'b0;
      link.el_data          <= '0;
    end else if (link.el_ready_to_send && !link.el_ack_data) begin
      waits++;
    end else begin
      int nxt;
      nxt = sent + int'(link.el_ready_to_send);
      sent = nxt;
      if (nxt < N && $urandom_range(0, 3) != 0) begin
        link.el_ready_to_send <= 1'b1;
        link.el_data          <= 16'(nxt * 7 + 3);
      end else begin
        link.el_ready_to_send <= 1'b0;
      end
    end
  end

  // Receiver: randomly busy.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link.el_ack_data <= 1'b0;
    else        link.el_ack_data <= ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (link.xfer !== (link.el_ready_to_send && link.el_ack_data)) begin
        failures++;
        $display("xfer wrong: rts=%0b ack=%0b xfer=%0b", link.el_ready_to_send,
                 link.el_ack_data, link.xfer);
      end
      if (link.el_ack_data && !link.el_ready_to_send) idle_acks++;
      if (link.xfer) begin
        checks++;
        if (link.el_data !== 16'(rcvd * 7 + 3)) begin
          failures++;
          $display("word %0d: got %0d", rcvd, link.el_data);
        end
        rcvd++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (rcvd == N);
    repeat (10) @(posedge clk);
    checks++;
    if (rcvd != N || waits == 0 || idle_acks == 0) begin
      failures++;
      $display("received %0d of %0d, waits %0d, idle acks %0d", rcvd, N, waits, idle_acks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
