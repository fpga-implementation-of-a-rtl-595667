// tb_spi_interface: drives the SPI slave as a mode-0 host would (SCK eight
// system clocks per period, MSB first) and checks every command: the three
// coefficient writes, the operation write, the row/column write, and the
// five-byte pixel read-back. It also checks that an aborted write (slave
// select released before the last byte) leaves the register unchanged and
// that a back-to-back sequence of transactions works. A random phase then
// runs 300 transactions with random commands (unknown ones included), random
// data, a random SCK speed and occasional early aborts against a reference
// model of the registers, checking every register after each transaction and
// every byte of each read-back.
module tb_spi_interface;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_phase();
    logic [15:0] m_c [3];
    logic [7:0]  m_op;
    logic [15:0] m_row, m_col;
    int          n_abort = 0, n_unknown = 0, n_read = 0;
    m_c = '{c0, c1, c2};
    m_op = op;
    m_row = row;
    m_col = col;
    for (int t = 0; t < 300; t++) begin
      byte unsigned tx [$];
      int           cmd, nbytes, len;
      bit           abort;
      half = int'($urandom_range(3, 7));   // SCK below clk/4, as the slave requires
      cmd  = ($urandom_range(0, 9) == 0) ? int'($urandom_range(7, 255)) : int'($urandom_range(1, 6));
      nbytes = (cmd <= 3) ? 2 : (cmd == 4) ? 1 : (cmd == 5) ? 4 : (cmd == 6) ? 5 : 2;
      abort  = (cmd <= 5) && ($urandom_range(0, 7) == 0);
      len    = abort ? int'($urandom_range(0, nbytes - 1)) : nbytes;
      tx.push_back(8'(cmd));
      for (int i = 0; i < len; i++) tx.push_back(8'($urandom));
      if (cmd == 6) begin
        fix_pix   = 24'($urandom);
        float_pix = 16'($urandom);
      end
      xfer(tx);
      if (abort) n_abort++;
      if (cmd > 6) n_unknown++;
      if (!abort) begin
        case (cmd)
          1, 2, 3: m_c[cmd-1] = {tx[1], tx[2]};
          4:       m_op = tx[1];
          5:       begin m_row = {tx[1], tx[2]}; m_col = {tx[3], tx[4]}; end
          default: ;
        endcase
      end
      expect16("c0", c0, m_c[0]);
      expect16("c1", c1, m_c[1]);
      expect16("c2", c2, m_c[2]);
      expect16("op", 16'(op), 16'(m_op));
      expect16("row", row, m_row);
      expect16("col", col, m_col);
      if (cmd == 6) begin
        n_read++;
        expect16("read R,G", {rx[1], rx[2]}, fix_pix[23:8]);
        expect16("read B", 16'(rx[3]), 16'(fix_pix[7:0]));
        expect16("read float", {rx[4], rx[5]}, float_pix);
      end
    end
    $display("random phase: %0d aborted, %0d unknown commands, %0d reads", n_abort, n_unknown, n_read);
    checks += 3;
    if (n_abort == 0) failures++;
    if (n_unknown == 0) failures++;
    if (n_read == 0) failures++;
  endtask

  logic        sck = 1'b0, ss_n = 1'b1, mosi = 1'b0, miso;
  logic [15:0] c0, c1, c2, row, col;
  logic [7:0]  op;
  logic [23:0] fix_pix = 24'hD2D3D5;
  logic [15:0] float_pix = 16'h5688;

  spi_interface dut (
    .clk, .rst, .sck, .ss_n, .mosi, .miso,
    .c0, .c1, .c2, .op, .row, .col, .fix_pix, .float_pix
  );

  byte unsigned rx [$];

  // One transaction: the bytes of tx are sent, the bytes seen on MISO kept.
  int half = 4;   // system clocks per SCK half period
  task automatic xfer(byte unsigned tx [$]);
    rx.delete();
    ss_n = 1'b0;
    repeat (8) @(posedge clk);
    foreach (tx[i]) begin
      byte unsigned r;
      r = 0;
      for (int bit_i = 7; bit_i >= 0; bit_i--) begin
        mosi = tx[i][bit_i];
        repeat (half) @(posedge clk);
        sck = 1'b1;
        r = {r[6:0], miso};
        repeat (half) @(posedge clk);
        sck = 1'b0;
      end
      rx.push_back(r);
    end
    repeat (8) @(posedge clk);
    ss_n = 1'b1;
    repeat (8) @(posedge clk);
  endtask

  task automatic expect16(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s = %h, want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);
    expect16("c0 reset", c0, 16'h3C00);
    xfer('{8'h01, 8'h55, 8'h54});
    expect16("c0", c0, 16'h5554);
    xfer('{8'h02, 8'h27, 8'h17});
    expect16("c1", c1, 16'h2717);
    xfer('{8'h03, 8'h51, 8'h8D});
    expect16("c2", c2, 16'h518D);
    xfer('{8'h04, 8'h02});
    expect16("op", 16'(op), 16'h0002);
    xfer('{8'h05, 8'h00, 8'h7B, 8'h01, 8'hC8});
    expect16("row", row, 16'd123);
    expect16("col", col, 16'd456);
    // Aborted write: only one of two data bytes.
    xfer('{8'h01, 8'hAA});
    expect16("c0 after abort", c0, 16'h5554);
    // Read back.
    xfer('{8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    checks++;
    if (rx.size() != 6 || rx[1] != 8'hD2 || rx[2] != 8'hD3 || rx[3] != 8'hD5 ||
        rx[4] != 8'h56 || rx[5] != 8'h88) begin
      failures++;
      $display("read-back %p", rx);
    end
    // A second read after the sampled values change.
    fix_pix = 24'h010203;
    float_pix = 16'hABCD;
    xfer('{8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    checks++;
    if (rx[1] != 8'h01 || rx[2] != 8'h02 || rx[3] != 8'h03 || rx[4] != 8'hAB || rx[5] != 8'hCD) begin
      failures++;
      $display("second read-back %p", rx);
    end
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
