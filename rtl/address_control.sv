// Address control: memory addressing of the build (compositing) buffer,
// the display buffer and the beta buffer, and the ping-pong buffer select.
//
// Addresses are {J, I}: I (bits 8:0) is the word, i.e. the 1x4 pixel group,
// in a line, J (bits 13:9) the line in the 32-line band, as in the chip.
// One address serves four pixels in all four buffers at once.
//
// comp_sel names the colour buffer being composited (0 = M, 1 = N); the
// other one is displayed. It toggles on each band_swap pulse from the
// display address generator, i.e. when the display has shown the last line
// of its band.
//
// Compositing (compositor address generator): the sprite engine's address
// drives the read ports of the compositing buffer and the beta buffer at
// once; the address, the valid flag and the buffer select are delayed by
// 1 + STAGES cycles and then drive the write ports, so each group is written
// back where it was read. rd_sel / wr_sel tell the compositing engine which
// buffer the returning read and the write-back belong to; an access keeps
// its buffer even if a swap happens while it is in flight.
//
// Display: the display address drives the read port of the display buffer;
// disp_clear writes that word back as empty (zero colour, pixel valid
// clear) through its otherwise idle write port, so the buffer is empty when
// it becomes the compositing buffer again. A write-back of the compositor
// has priority on a buffer's write port.
//
// Nothing forwards a write-back to a later read: the sprite engine must not
// present an address again within 1 + STAGES cycles. An assertion checks
// this rule.
//
// Reset: after rst_n the block sweeps every word of both colour buffers,
// writing them empty (10752 cycles); comp_ready is low meanwhile and the
// sprite engine must not present groups.
//
// The J/I split and one address per four pixels are the chip's; the
// clearing scheme, the reset sweep and the timing are this design's own.
module address_control
  import cdac_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // sprite engine
  input  logic  comp_valid,
  input  addr_t comp_addr,
  output logic  comp_ready,
  // display address generator
  input  logic  disp_rd,
  input  addr_t disp_addr,
  input  logic  disp_clear,
  input  logic  band_swap,
  // selects
  output logic  comp_sel,
  output logic  disp_sel,      // buffer being displayed, for read data
  output logic  rd_sel,        // compositing read returning now
  output logic  wr_sel,        // compositing write-back now
  output logic  wb_valid,      // a compositing write-back happens now
  // colour buffer M ports
  output logic  m_wr,
  output addr_t m_wr_addr,
  output addr_t m_rd_addr,
  // colour buffer N ports
  output logic  n_wr,
  output addr_t n_wr_addr,
  output addr_t n_rd_addr,
  // beta buffer ports
  output logic  beta_wr,
  output addr_t beta_wr_addr,
  output addr_t beta_rd_addr
);

  localparam int unsigned LAT = 1 + STAGES;

  typedef struct packed {
    logic  valid;
    logic  sel;
    addr_t addr;
  } acc_t;

  // ---- reset sweep ------------------------------------------------------
  logic             init_busy;
  logic [I_W-1:0]   init_i;
  logic [J_W-1:0]   init_j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_i    <= '0;
      init_j    <= '0;
    end else if (init_busy) begin
      if (int'(init_i) == WORDS_PER_LINE - 1) begin
        init_i <= '0;
        init_j <= init_j + 1'b1;
        if (int'(init_j) == BAND_LINES - 1) init_busy <= 1'b0;
      end else begin
        init_i <= init_i + 1'b1;
      end
    end
  end

  assign comp_ready = !init_busy;

  // ---- buffer select ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         comp_sel <= 1'b0;
    else if (band_swap) comp_sel <= !comp_sel;
  end

  // ---- compositor address pipeline ---------------------------------------
  acc_t acc_in, acc_rd, acc_wb;
  acc_t pipe_q [LAT];

  assign acc_in = '{valid: comp_valid && !init_busy, sel: comp_sel, addr: comp_addr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(LAT); s++) pipe_q[s] <= '0;
    end else begin
      pipe_q[0] <= acc_in;
      for (int s = 1; s < int'(LAT); s++) pipe_q[s] <= pipe_q[s-1];
    end
  end

  assign acc_rd   = pipe_q[0];
  assign acc_wb   = pipe_q[LAT-1];
  assign rd_sel   = acc_rd.sel;
  assign wr_sel   = acc_wb.sel;
  assign wb_valid = acc_wb.valid;

  // Display read data returns one cycle after the address.
  always_ff @(posedge clk) disp_sel <= !comp_sel;

  // ---- port addresses ---------------------------------------------------
  always_comb begin
    // read ports: compositing buffer follows the sprite engine, the other
    // buffer follows the display
    m_rd_addr = comp_sel ? disp_addr : comp_addr;
    n_rd_addr = comp_sel ? comp_addr : disp_addr;
    beta_rd_addr = comp_addr;

    // write ports
    m_wr = 1'b0;  m_wr_addr = disp_addr;
    n_wr = 1'b0;  n_wr_addr = disp_addr;
    if (init_busy) begin
      m_wr = 1'b1;  m_wr_addr = {init_j, init_i};
      n_wr = 1'b1;  n_wr_addr = {init_j, init_i};
    end else begin
      if (acc_wb.valid && !acc_wb.sel) begin
        m_wr = 1'b1;  m_wr_addr = acc_wb.addr;
      end else if (disp_rd && disp_clear && comp_sel) begin
        m_wr = 1'b1;
      end
      if (acc_wb.valid && acc_wb.sel) begin
        n_wr = 1'b1;  n_wr_addr = acc_wb.addr;
      end else if (disp_rd && disp_clear && !comp_sel) begin
        n_wr = 1'b1;
      end
    end
    beta_wr      = acc_wb.valid;
    beta_wr_addr = acc_wb.addr;
  end

  // ---- sprite engine rule -------------------------------------------------
  // Nothing forwards write-back data to a later read, so a group must not
  // use an address whose read-modify-write is still in flight.
  for (genvar s = 0; s < int'(LAT); s++) begin : g_raw
    a_no_readback_hazard: assert property (@(posedge clk) disable iff (!rst_n)
      !(acc_in.valid && pipe_q[s].valid && pipe_q[s].sel == acc_in.sel &&
        pipe_q[s].addr == acc_in.addr))
      else $error("address %h sent again within %0d clocks", comp_addr, LAT);
  end

endmodule
