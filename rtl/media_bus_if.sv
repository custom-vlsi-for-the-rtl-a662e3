// Media bus interface: 16-bit, PCI-like target for initialisation and
// operational control of the compositing DAC by the media DSP.
//
// Protocol (active-high signals; this design's reading of "PCI-like"):
//   address phase  the initiator raises frame for one cycle with the 16-bit
//                  register address on ad_in and wr = 1 for a write burst,
//                  0 for a read burst.
//   data phases    the target answers with devsel from the next cycle on.
//                  A word moves in each cycle where irdy and trdy are both
//                  high; the address then increments. Writes: trdy is high
//                  in every data cycle, data on ad_in. Reads: each word takes
//                  a wait cycle (trdy low) and is then driven on ad_out with
//                  ad_oe high and trdy high. The initiator keeps frame high
//                  until the cycle of its last transfer, as on PCI.
//                  An assertion checks that frame only drops while irdy is
//                  high.
// Register map (word addresses, this design's choice):
//   0x0000 CTRL    bit 0 display enable, bit 1 stereo mode (reset 0)
//   0x0001 STATUS  read only, bit 0 buffer being composited (0 = M),
//                  bit 1 buffer clear after reset in progress
//   0x0100-0x01FF  red LUT, 0x0200-0x02FF green LUT, 0x0300-0x03FF blue
//                  LUT (entry in bits 7:0)
// Writes to other addresses are ignored; reads of them return 0.
module media_bus_if (
  input  logic        clk,
  input  logic        rst_n,
  // media bus
  input  logic        frame,
  input  logic        wr,
  input  logic        irdy,
  input  logic [15:0] ad_in,
  output logic [15:0] ad_out,
  output logic        ad_oe,
  output logic        trdy,
  output logic        devsel,
  // control and status
  output logic        display_en,
  output logic        stereo,
  input  logic        comp_sel,
  input  logic        init_busy,
  // LUT access
  output logic [2:0]  lut_we,      // one per channel: red, green, blue
  output logic [7:0]  lut_addr,
  output logic [7:0]  lut_wdata,
  input  logic [7:0]  lut_rdata [3]
);

  typedef enum logic [1:0] {IDLE, WRITE, READ_WAIT, READ} state_t;
  state_t      state;
  logic [15:0] addr;
  logic        xfer, last;

  assign xfer = irdy && trdy;
  assign last = !frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      addr  <= '0;
    end else begin
      unique case (state)
        IDLE:
          if (frame) begin
            addr  <= ad_in;
            state <= wr ? WRITE : READ_WAIT;
          end
        WRITE:
          if (xfer) begin
            addr <= addr + 1'b1;
            if (last) state <= IDLE;
          end
        READ_WAIT:
          state <= READ;
        READ:
          if (xfer) begin
            addr  <= addr + 1'b1;
            state <= last ? IDLE : READ_WAIT;
          end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    devsel = state != IDLE;
    trdy   = (state == WRITE) || (state == READ);
    ad_oe  = state == READ;
  end

  // As on PCI, the initiator may drop frame (announce its last transfer) only
  // while it drives irdy.
  a_frame_needs_irdy: assert property (@(posedge clk) disable iff (!rst_n)
    (state != IDLE && !frame) |-> irdy)
    else $error("frame dropped without irdy");

  // register writes
  logic is_lut;
  assign is_lut = addr[15:10] == '0 && addr[9:8] != 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      display_en <= 1'b0;
      stereo     <= 1'b0;
    end else if (state == WRITE && xfer && addr == 16'h0000) begin
      display_en <= ad_in[0];
      stereo     <= ad_in[1];
    end
  end

  always_comb begin
    lut_addr  = addr[7:0];
    lut_wdata = ad_in[7:0];
    lut_we    = '0;
    if (state == WRITE && xfer && is_lut) lut_we[addr[9:8] - 2'd1] = 1'b1;
  end

  // read data: the LUT answers one cycle after its address (READ_WAIT)
  always_comb begin
    ad_out = '0;
    if (addr == 16'h0000)      ad_out = {14'd0, stereo, display_en};
    else if (addr == 16'h0001) ad_out = {14'd0, init_busy, comp_sel};
    else if (is_lut)           ad_out = {8'd0, lut_rdata[addr[9:8] - 2'd1]};
  end

endmodule
