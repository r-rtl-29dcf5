// Self-checking testbench of the UART IP (8 clocks per bit to keep it
// short). Transmit: single words and a burst that overflows the buffer are
// decoded from the serial line and compared with what was written; the
// words beyond buffer capacity must be dropped and counted. Receive:
// packets (port index + 32-bit sample) are sent on the line; each must
// overwrite only its own sampling port, and ports must keep their values
// when read repeatedly.
module tb_aero_uart_ip;
  import aero_pkg::*;
  localparam int CPB = 8;
  localparam int NPORTS = 4;

  logic clk = 0, rst = 1;
  logic tx_we, tx_full, txd, rxd;
  word_t tx_data;
  logic [15:0] tx_dropped, rx_count;
  word_t port_data [NPORTS];
  int checks = 0, failures = 0;
  word_t rx_words [$];
  word_t ref_port [NPORTS];

  aero_uart_ip #(.CLKS_PER_BIT(CPB), .TXBUF_DEPTH(4), .NPORTS(NPORTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // serial decoder of txd: bytes -> 32-bit words, LSB first
  initial begin
    logic [7:0] b; word_t w; int nb;
    nb = 0; w = 0;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (!rst) begin
        checks++;
        if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      end
      w = {b, w[31:8]};
      nb++;
      if (nb == 4) begin rx_words.push_back(w); nb = 0; end
    end
  end

  task automatic send_byte(logic [7:0] b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic send_packet(logic [7:0] port, word_t v);
    send_byte(port);
    for (int i = 0; i < 4; i++) send_byte(v[8*i +: 8]);
  endtask

  initial begin
    word_t sent [$];
    tx_we = 0; tx_data = 0; rxd = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // single words
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); tx_we = 1; tx_data = $urandom; sent.push_back(tx_data);
      @(negedge clk); tx_we = 0;
      repeat (CPB * 45) @(posedge clk);
    end
    chk(rx_words.size() == 3, $sformatf("3 words sent, %0d decoded", rx_words.size()));
    foreach (sent[k]) if (k < rx_words.size())
      chk(rx_words[k] == sent[k], $sformatf("word %0d %h vs %h", k, rx_words[k], sent[k]));
    chk(tx_dropped == 0, "nothing dropped");
    // burst of 8 back-to-back words: 1 goes to the shifter, 4 to the buffer
    rx_words.delete(); sent.delete();
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); tx_we = 1; tx_data = 32'h1000_0000 + k; sent.push_back(tx_data);
    end
    @(negedge clk); tx_we = 0;
    chk(tx_full == 1, "buffer full after burst");
    repeat (CPB * 40 * 6) @(posedge clk);
    chk(tx_dropped == 3, $sformatf("dropped %0d expected 3", tx_dropped));
    chk(rx_words.size() == 5, $sformatf("5 burst words decoded, got %0d", rx_words.size()));
    foreach (rx_words[k]) chk(rx_words[k] == sent[k], $sformatf("burst word %0d %h", k, rx_words[k]));
    chk(tx_full == 0, "buffer drained");
    // receive side
    foreach (ref_port[p]) ref_port[p] = 0;
    for (int k = 0; k < 12; k++) begin
      logic [7:0] p;
      word_t v;
      p = 8'($urandom % NPORTS);
      v = $urandom;
      send_packet(p, v);
      ref_port[p] = v;
      repeat (3) @(posedge clk);
      chk(rx_count == 16'(k + 1), $sformatf("rx_count %0d", rx_count));
      for (int q = 0; q < NPORTS; q++)
        chk(port_data[q] == ref_port[q], $sformatf("port %0d = %h expected %h", q, port_data[q], ref_port[q]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
