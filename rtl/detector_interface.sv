// detector_interface: feature coordinates and their read-out by a CPU.
//
// When the feature detector flags a maximum, the position of the pixel is
// recovered from the current x_cnt / y_cnt by subtracting the fixed
// pipeline distances DELTA_X and DELTA_Y (with wrap-around into the
// previous line or frame). Positions closer than MARGIN to the image edge,
// where the largest filter would reach outside the image, are discarded.
// Accepted features are queued in a FIFO that a CPU drains through a small
// memory-mapped slave, either by polling or on the irq output.
//
// Register map (word addresses, 32-bit data, read data valid one tick after
// the read strobe):
//   0 FEATURE   read: [31] valid, [XW-1:0] x, [XW+YW-1:XW] y,
//               [XW+YW+NDET-1:XW+YW] scale mask (bit i = interval i+2);
//               a read of a valid entry removes it from the FIFO
//   1 STATUS    read: [15:0] entries queued, [16] overflow (a feature was
//               dropped because the FIFO was full), [31:24] frame count;
//               write 1 to bit 16 to clear the overflow flag
//   2 THRESHOLD read/write: detection threshold (32-bit signed)
//   3 CONTROL   read/write: [0] interrupt enable
// irq is high while the interrupt is enabled and the FIFO is not empty.
//
// The coordinate subtraction, the slave role and the interrupt follow the
// source design, which leaves the bus application specific; the register
// map, the FIFO and its depth are this design's choices.
module detector_interface
  import surf_pkg::*;
#(
  parameter int unsigned W          = DEF_W,
  parameter int unsigned H          = DEF_H,
  parameter int unsigned H_TOTAL    = DEF_H_TOTAL,
  parameter int unsigned V_TOTAL    = DEF_V_TOTAL,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                  pixel_clk,
  input  logic                  rst,
  // from the feature detector
  input  logic [NDET-1:0]       feature_data,
  input  sync_t                 sync,
  output logic signed [SC_W-1:0] threshold,
  // memory-mapped slave
  input  logic [1:0]            address,
  input  logic                  read,
  input  logic                  write,
  input  logic [31:0]           writedata,
  output logic [31:0]           readdata,
  output logic                  readdatavalid,
  output logic                  irq
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- coordinate recovery ----------------
  int       fx, fy;
  logic     in_image;
  feature_t feat;

  always_comb begin
    fx = int'(sync.x) - int'(DELTA_X);
    fy = int'(sync.y) - int'(DELTA_Y);
    if (fx < 0) begin
      fx = fx + int'(H_TOTAL);
      fy = fy - 1;
    end
    if (fy < 0) fy = fy + int'(V_TOTAL);
    in_image = (fx >= int'(MARGIN)) && (fx < int'(W) - int'(MARGIN)) &&
               (fy >= int'(MARGIN)) && (fy < int'(H) - int'(MARGIN));
    feat.scale = feature_data;
    feat.y     = YW'(fy);
    feat.x     = XW'(fx);
  end

  // ---------------- feature FIFO ----------------
  feature_t      fifo_mem [FIFO_DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic          push, pop, full, empty;
  logic          overflow;
  logic [7:0]    frame_cnt;
  logic          irq_en;

  assign full  = (32'(count) == FIFO_DEPTH);
  assign empty = (count == '0);
  assign push  = (feature_data != '0) && in_image && !full;
  assign pop   = read && (address == 2'd0) && !empty;

  always_ff @(posedge pixel_clk) begin
    if (push) fifo_mem[wr_ptr] <= feat;
  end

  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      frame_cnt <= '0;
      irq_en    <= 1'b0;
      threshold <= '0;
    end else begin
      if (push) wr_ptr <= (32'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (32'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
      if (sync.vs) frame_cnt <= frame_cnt + 1'b1;
      if ((feature_data != '0) && in_image && full) overflow <= 1'b1;
      else if (write && address == 2'd1 && writedata[16]) overflow <= 1'b0;
      if (write && address == 2'd2) threshold <= writedata;
      if (write && address == 2'd3) irq_en <= writedata[0];
    end
  end

  // ---------------- read port ----------------
  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      readdatavalid <= read;
      readdata      <= '0;
      if (read) begin
        unique case (address)
          2'd0: if (!empty) readdata <= {1'b1, 31'(fifo_mem[rd_ptr])};
          2'd1: readdata <= {frame_cnt, 7'd0, overflow, 16'(count)};
          2'd2: readdata <= 32'(threshold);
          2'd3: readdata <= {31'd0, irq_en};
        endcase
      end
    end
  end

  assign irq = irq_en && !empty;

  // the packed feature entry must fit below the valid bit
  initial assert ($bits(feature_t) <= 31);

endmodule
