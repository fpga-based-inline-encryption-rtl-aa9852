// ctrl_regs: the register interface through which the processor sets up and
// watches the bridge.
//
// The processor loads Key1 and Key2 (kept only in these volatile registers,
// cleared by reset and never readable), starts the key expansion, switches
// between encrypted and transparent (non-encrypted) operation and reads
// status and event counters.  These duties are the document's; the register
// map and the simple bus (one write or read per clock, combinational read
// data) are this design's own.
//
// Register map (32-bit word addresses):
//   0x00 CTRL    rw  [0] crypt_en, [1] key_load (write 1: expand both keys; reads 0)
//   0x01 STATUS  ro  [0] keys ready, [1] bridge busy, [2] encryption active
//   0x02 ENC_BLOCKS   0x03 DEC_BLOCKS   0x04 H2D_FRAMES   0x05 D2H_FRAMES
//   0x06 FRAME_ERRORS 0x07 COLLISIONS   0x08 TWEAK_STALLS 0x09 CLEAR_DATA_FIS
//   0x0A COMMANDS     0x0B NCQ_SETUPS (event counters, ro; writing any value
//   clears one)
//   0x10..0x17 KEY1  wo  0x10 = key bits [255:224] ... 0x17 = [31:0]
//   0x18..0x1F KEY2  wo  same order
module ctrl_regs
  import xts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        reg_we,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // configuration
  output key256_t     key1,
  output key256_t     key2,
  output logic        key_load,
  output logic        crypt_en,
  // status
  input  logic        keys_ready,
  input  logic        bridge_busy,
  input  logic [9:0]  events      // one pulse per counter 0x02..0x0B
);

  localparam int unsigned N_CNT = 10;
  logic [31:0] cnt [N_CNT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key1     <= '0;
      key2     <= '0;
      key_load <= 1'b0;
      crypt_en <= 1'b0;
      for (int i = 0; i < N_CNT; i++) cnt[i] <= '0;
    end else begin
      key_load <= 1'b0;
      for (int i = 0; i < N_CNT; i++)
        if (reg_we && reg_addr == 8'(i + 2)) cnt[i] <= '0;
        else if (events[i])                 cnt[i] <= cnt[i] + 32'd1;
      if (reg_we) begin
        if (reg_addr == 8'h00) begin
          crypt_en <= reg_wdata[0];
          key_load <= reg_wdata[1];
        end
        if (reg_addr[7:3] == 5'b00010) key1[255 - 32*reg_addr[2:0] -: 32] <= reg_wdata;
        if (reg_addr[7:3] == 5'b00011) key2[255 - 32*reg_addr[2:0] -: 32] <= reg_wdata;
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr == 8'h00) reg_rdata = {31'h0, crypt_en};
    else if (reg_addr == 8'h01) reg_rdata = {29'h0, crypt_en && keys_ready, bridge_busy, keys_ready};
    else if (reg_addr >= 8'h02 && reg_addr < 8'(2 + N_CNT)) reg_rdata = cnt[4'(reg_addr - 8'h02)];
  end

endmodule
