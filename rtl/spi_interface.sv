// spi_interface: SPI slave that lets a host computer reconfigure the pixel
// datapath while video runs and read single pixels back.
//
// The host writes the three float16 coefficients c0, c1, c2 (two bytes each),
// the operation select, and the row/column of a pixel to inspect (two bytes
// each, four in total); it reads back the inspected pixel as the 24-bit
// fixed-point input pixel followed by the 16-bit floating-point result. Those
// contents and sizes follow the library's host interface. The framing is this
// design's own: every transaction (slave select low) starts with a command
// byte, followed by the data bytes, most significant byte and bit first:
//   0x01 c0 (2 bytes)   0x02 c1 (2 bytes)   0x03 c2 (2 bytes)
//   0x04 op (1 byte)    0x05 row, col (4 bytes)
//   0x06 read: the slave sends R, G, B, float[15:8], float[7:0] on MISO.
// A written register changes only once all of its bytes have arrived, so the
// datapath never sees half of a new value.
//
// SPI mode 0 (MOSI sampled on the rising SCK edge, MISO changed on the
// falling edge). SCK, SS_N and MOSI are resynchronised into the system clock
// with two flip-flops and their edges detected there, so SCK must be slower
// than a quarter of clk.
module spi_interface #(
  parameter int unsigned FLT_W = 16,
  parameter int unsigned POS_W = 16,
  parameter logic [FLT_W-1:0] C_RESET = 16'h3C00   // 1.0 in float16
) (
  input  logic             clk,
  input  logic             rst,
  // SPI pins
  input  logic             sck,
  input  logic             ss_n,
  input  logic             mosi,
  output logic             miso,
  // Registers
  output logic [FLT_W-1:0] c0,
  output logic [FLT_W-1:0] c1,
  output logic [FLT_W-1:0] c2,
  output logic [7:0]       op,
  output logic [POS_W-1:0] row,
  output logic [POS_W-1:0] col,
  // Read-back
  input  logic [23:0]      fix_pix,
  input  logic [FLT_W-1:0] float_pix
);

  typedef enum logic [7:0] {
    CMD_C0   = 8'h01,
    CMD_C1   = 8'h02,
    CMD_C2   = 8'h03,
    CMD_OP   = 8'h04,
    CMD_POS  = 8'h05,
    CMD_READ = 8'h06
  } cmd_e;

  localparam int unsigned TXW = 24 + FLT_W;

  // Resynchronisers.
  logic [2:0] sck_s;
  logic [1:0] ss_s;
  logic [1:0] mosi_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      sck_s  <= '0;
      ss_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      ss_s   <= {ss_s[0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  logic sck_rise, sck_fall, active;
  assign sck_rise = (sck_s[2:1] == 2'b01);
  assign sck_fall = (sck_s[2:1] == 2'b10);
  assign active   = !ss_s[1];

  logic [2:0]       bit_cnt;
  logic [3:0]       byte_cnt;      // bytes completed in this transaction
  logic [6:0]       rx_sh;
  logic [7:0]       cmd;
  logic [23:0]      data_sh;       // data bytes of the current command
  logic [TXW-1:0]   tx_sh;
  logic             load_pending;

  logic [7:0] rx_byte;
  assign rx_byte = {rx_sh[6:0], mosi_s[1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt      <= '0;
      byte_cnt     <= '0;
      rx_sh        <= '0;
      cmd          <= '0;
      data_sh      <= '0;
      tx_sh        <= '0;
      load_pending <= 1'b0;
      c0           <= C_RESET;
      c1           <= C_RESET;
      c2           <= C_RESET;
      op           <= '0;
      row          <= '0;
      col          <= '0;
    end else if (!active) begin
      bit_cnt      <= '0;
      byte_cnt     <= '0;
      load_pending <= 1'b0;
      tx_sh        <= '0;
    end else begin
      if (sck_rise) begin
        rx_sh   <= rx_byte[6:0];
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == 3'd7) begin
          if (byte_cnt != 4'hF) byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 0) begin
            cmd          <= rx_byte;
            load_pending <= (rx_byte == CMD_READ);
          end else begin
            data_sh <= {data_sh[15:0], rx_byte};
            // Commit when the command's last data byte has arrived.
            case (cmd)
              CMD_C0:  if (byte_cnt == 2) c0 <= {data_sh[7:0], rx_byte};
              CMD_C1:  if (byte_cnt == 2) c1 <= {data_sh[7:0], rx_byte};
              CMD_C2:  if (byte_cnt == 2) c2 <= {data_sh[7:0], rx_byte};
              CMD_OP:  if (byte_cnt == 1) op <= rx_byte;
              CMD_POS: if (byte_cnt == 4) begin
                         row <= POS_W'(data_sh[23:8]);
                         col <= POS_W'({data_sh[7:0], rx_byte});
                       end
              default: ;
            endcase
          end
        end
      end
      if (sck_fall) begin
        if (load_pending) begin
          tx_sh        <= {fix_pix, float_pix};
          load_pending <= 1'b0;
        end else begin
          tx_sh <= tx_sh << 1;
        end
      end
    end
  end

  assign miso = tx_sh[TXW-1];

endmodule
