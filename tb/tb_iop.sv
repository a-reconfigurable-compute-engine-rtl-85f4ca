// tb_iop: self-checking test of the Input/Output Port in its four modes.
// Random channel values and acknowledges are applied; each output is
// compared with what the mode must connect (send: core -> link, receive:
// link -> core, feedback: core output looped to core input, off: idle).
module tb_iop;
  import dffc_pkg::*;
  iop_mode_e mode;
  chan_t tx_in, rx_out, link_tx, link_rx;
  logic tx_ack, rx_ack, link_tx_ack, link_rx_ack;
  int checks = 0, failures = 0;

  iop dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      mode = iop_mode_e'(i % 4);
      tx_in = chan_t'($urandom); link_rx = chan_t'($urandom);
      rx_ack = 1'($urandom); link_tx_ack = 1'($urandom);
      #1;
      case (mode)
        IOP_SEND: begin
          chk(link_tx == tx_in && tx_ack == link_tx_ack, "send path");
          chk(!rx_out.valid && !link_rx_ack, "send: receive side idle");
        end
        IOP_RECV: begin
          chk(rx_out == link_rx && link_rx_ack == rx_ack, "receive path");
          chk(!link_tx.valid && !tx_ack, "receive: send side idle");
        end
        IOP_FEEDBACK: begin
          chk(rx_out == tx_in && tx_ack == rx_ack, "feedback loop");
          chk(!link_tx.valid && !link_rx_ack, "feedback: link idle");
        end
        default:
          chk(!link_tx.valid && !rx_out.valid && !tx_ack && !link_rx_ack, "off");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
