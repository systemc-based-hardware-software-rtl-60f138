// ecc_soc: hardware of the user-terminal ECC system-on-chip.
//
// The terminal runs an elliptic-curve mutual authentication protocol
// (ECDSA signatures, ECDH key agreement over the 160-bit curve secp160r1).
// A general-purpose processor runs the protocol, the curve arithmetic
// (point addition, doubling, multiplication), random numbers and the XOR
// stream cipher in software. This module is everything on the slave side of
// its system bus:
//   map       modular arithmetic processor (GF(p) add, sub, mul, div)
//   sha1      SHA-1 hashing accelerator
//   timer32   32-bit cycle timer
//   abstract_io x2  word I/O ports (IO1, IO2) towards off-chip systems
// The processor itself is outside; its bus is brought out as ports.
//
// Bus: single-cycle memory-mapped slave, 8-bit word address, 32-bit data.
// A write takes effect at the clock edge where bus_write is high; read data
// is combinational from bus_addr while bus_read is high (zero otherwise),
// and a read of an IO data address pops that word at the clock edge. The
// address map is in ecc_soc_pkg. The bus protocol and address map are this
// design's choices; the original design says each hardware port is mapped to its
// own address and driven by firmware drivers.
//
// Register behaviour per peripheral:
//   MAP     control and data_in0..5 are registers written by the bus and
//           held as the MAP's level inputs; status and data_out0..5 read back.
//   SHA     block words W0..W15 are registers; writing SHA control bit 0
//           (reset_SHA1) or bit 1 (hash_compute) gives a one-cycle pulse.
//   timer   control bits 0/1/2 give one-cycle reset/start/stop pulses.
//   IO      a write to the data address is put_word, a read is get_word.
module ecc_soc
  import ecc_soc_pkg::*;
#(
  parameter int DATA_WIDTH = 161
) (
  input  logic        clk,
  input  logic        rst_n,
  // system bus from the processor
  input  logic [7:0]  bus_addr,
  input  logic        bus_write,
  input  logic [31:0] bus_writedata,
  input  logic        bus_read,
  output logic [31:0] bus_readdata,
  // IO1 off-chip streams
  output logic        io1_tx_valid,
  output logic [31:0] io1_tx_data,
  input  logic        io1_tx_ready,
  input  logic        io1_rx_valid,
  input  logic [31:0] io1_rx_data,
  output logic        io1_rx_ready,
  // IO2 off-chip streams
  output logic        io2_tx_valid,
  output logic [31:0] io2_tx_data,
  input  logic        io2_tx_ready,
  input  logic        io2_rx_valid,
  input  logic [31:0] io2_rx_data,
  output logic        io2_rx_ready
);
  // ---------------- write decode ----------------
  logic [31:0] map_ctrl_q;
  logic [31:0] map_din_q [MAP_WORDS];
  logic [31:0] sha_blk_q [16];
  logic        sha_init, sha_start;
  logic        tmr_rst, tmr_start, tmr_stop;
  logic        io1_put, io1_get, io2_put, io2_get;

  logic wr_tmr, wr_sha;
  assign wr_tmr    = bus_write && (bus_addr == A_TMR_CTRL);
  assign wr_sha    = bus_write && (bus_addr == A_SHA_CTRL);
  assign tmr_rst   = wr_tmr && bus_writedata[0];
  assign tmr_start = wr_tmr && bus_writedata[1];
  assign tmr_stop  = wr_tmr && bus_writedata[2];
  assign sha_init  = wr_sha && bus_writedata[0];
  assign sha_start = wr_sha && bus_writedata[1];
  assign io1_put   = bus_write && (bus_addr == A_IO1_DATA);
  assign io2_put   = bus_write && (bus_addr == A_IO2_DATA);
  assign io1_get   = bus_read  && (bus_addr == A_IO1_DATA);
  assign io2_get   = bus_read  && (bus_addr == A_IO2_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_ctrl_q <= '0;
      for (int i = 0; i < MAP_WORDS; i++) map_din_q[i] <= '0;
      for (int i = 0; i < 16; i++) sha_blk_q[i] <= '0;
    end else if (bus_write) begin
      if (bus_addr == A_MAP_CTRL) map_ctrl_q <= bus_writedata;
      for (int i = 0; i < MAP_WORDS; i++)
        if (bus_addr == A_MAP_DATA + 8'(i)) map_din_q[i] <= bus_writedata;
      for (int i = 0; i < 16; i++)
        if (bus_addr == A_SHA_BLOCK + 8'(i)) sha_blk_q[i] <= bus_writedata;
    end
  end

  // ---------------- peripherals ----------------
  logic [31:0] map_status;
  logic [31:0] map_dout [MAP_WORDS];

  map #(.DATA_WIDTH(DATA_WIDTH)) u_map (
    .clk, .rst_n,
    .ECC_control (map_ctrl_q),
    .data_in     (map_din_q),
    .ECC_status  (map_status),
    .data_out    (map_dout)
  );

  logic [31:0] sha_digest [5];
  logic        sha_busy, sha_done;

  sha1 u_sha (
    .clk, .rst_n,
    .init    (sha_init),
    .start   (sha_start),
    .block_w (sha_blk_q),
    .digest  (sha_digest),
    .busy    (sha_busy),
    .done    (sha_done)
  );

  logic [31:0] tmr_count;
  logic        tmr_running;

  timer32 #(.WIDTH(32)) u_timer (
    .clk, .rst_n,
    .rst_cnt (tmr_rst),
    .start   (tmr_start),
    .stop    (tmr_stop),
    .count   (tmr_count),
    .running (tmr_running)
  );

  logic [31:0] io1_get_data, io2_get_data;
  logic        io1_tx_full, io1_rx_avail, io2_tx_full, io2_rx_avail;

  abstract_io u_io1 (
    .clk, .rst_n,
    .put (io1_put), .put_data (bus_writedata),
    .get (io1_get), .get_data (io1_get_data),
    .tx_full (io1_tx_full), .rx_avail (io1_rx_avail),
    .tx_valid (io1_tx_valid), .tx_data (io1_tx_data), .tx_ready (io1_tx_ready),
    .rx_valid (io1_rx_valid), .rx_data (io1_rx_data), .rx_ready (io1_rx_ready)
  );

  abstract_io u_io2 (
    .clk, .rst_n,
    .put (io2_put), .put_data (bus_writedata),
    .get (io2_get), .get_data (io2_get_data),
    .tx_full (io2_tx_full), .rx_avail (io2_rx_avail),
    .tx_valid (io2_tx_valid), .tx_data (io2_tx_data), .tx_ready (io2_tx_ready),
    .rx_valid (io2_rx_valid), .rx_data (io2_rx_data), .rx_ready (io2_rx_ready)
  );

  // bus rule: one access per cycle, never a read and a write together
  a_bus_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(bus_write && bus_read));

  // ---------------- read multiplexer ----------------
  always_comb begin
    bus_readdata = '0;
    if (bus_read) begin
      unique case (bus_addr)
        A_MAP_CTRL:  bus_readdata = map_ctrl_q;
        A_MAP_STAT:  bus_readdata = map_status;
        A_TMR_COUNT: bus_readdata = tmr_count;
        A_TMR_CTRL:  bus_readdata = {31'd0, tmr_running};
        A_SHA_STAT:  bus_readdata = {30'd0, sha_busy, sha_done};
        A_IO1_DATA:  bus_readdata = io1_get_data;
        A_IO1_STAT:  bus_readdata = {30'd0, io1_tx_full, io1_rx_avail};
        A_IO2_DATA:  bus_readdata = io2_get_data;
        A_IO2_STAT:  bus_readdata = {30'd0, io2_tx_full, io2_rx_avail};
        default: begin
          for (int i = 0; i < MAP_WORDS; i++)
            if (bus_addr == A_MAP_DATA + 8'(i)) bus_readdata = map_dout[i];
          for (int i = 0; i < 5; i++)
            if (bus_addr == A_SHA_DIGEST + 8'(i)) bus_readdata = sha_digest[i];
        end
      endcase
    end
  end
endmodule
