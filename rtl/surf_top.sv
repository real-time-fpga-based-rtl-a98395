// surf_top: stream-based SURF feature detection with a frame-buffer DMA.
//
// Camera pixels enter video_sync, which attaches the raster position. The
// preprocessor turns the stream into an integral image, the feature
// detector evaluates the box-filter Hessian at four filter sizes (9, 15,
// 21, 27) by separable convolution and keeps the scale-space maxima, and
// the detector interface converts them to image coordinates and queues
// them for a CPU behind a memory-mapped slave port with an interrupt. In
// parallel, memory_buffer writes the raw image into a frame buffer through
// a bus master port, so that descriptors can be computed in software. One
// pixel is processed per pixel_clk tick; a feature is reported DELTA_Y
// lines and DELTA_X ticks after its pixel left video_sync's successor.
//
// The system bus, memory controller, external RAM and CPU are outside this
// module: the slave port (det_*) and the master port (mem_*) are brought
// out for them. All ports are plain signals and everything runs on
// pixel_clk with a synchronous, active-high reset.
module surf_top
  import surf_pkg::*;
#(
  parameter int unsigned W           = DEF_W,
  parameter int unsigned H           = DEF_H,
  parameter int unsigned H_TOTAL     = DEF_H_TOTAL,
  parameter int unsigned V_TOTAL     = DEF_V_TOTAL,
  parameter int unsigned FEAT_DEPTH  = 512,
  parameter int unsigned DMA_DEPTH   = 16
) (
  input  logic             pixel_clk,
  input  logic             rst,
  // camera
  input  logic [PIX_W-1:0] cam_data,
  input  logic             cam_frame_start,
  // detector interface: memory-mapped slave
  input  logic [1:0]       det_address,
  input  logic             det_read,
  input  logic             det_write,
  input  logic [31:0]      det_writedata,
  output logic [31:0]      det_readdata,
  output logic             det_readdatavalid,
  output logic             det_irq,
  // memory buffer: write master towards the frame buffer
  input  logic [31:0]      frame_base,
  output logic [31:0]      mem_address,
  output logic             mem_write,
  output logic [31:0]      mem_writedata,
  input  logic             mem_waitrequest,
  output logic             mem_overflow,
  output logic [YW-1:0]    mem_line_count
);

  logic [PIX_W-1:0]      vs_data;
  sync_t                 vs_sync;
  logic [II_W-1:0]       pp_ii;
  sync_t                 pp_sync;
  logic [NDET-1:0]       fd_data;
  sync_t                 fd_sync;
  logic signed [SC_W-1:0] threshold;

  video_sync #(.W(W), .H(H), .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL)) u_video_sync (
    .pixel_clk      (pixel_clk),
    .rst            (rst),
    .cam_data       (cam_data),
    .cam_frame_start(cam_frame_start),
    .pixel_data     (vs_data),
    .sync           (vs_sync)
  );

  preprocessor #(.LINE_LEN(H_TOTAL)) u_preprocessor (
    .pixel_clk (pixel_clk),
    .rst       (rst),
    .pixel_data(vs_data),
    .sync_in   (vs_sync),
    .ii        (pp_ii),
    .sync_out  (pp_sync)
  );

  feature_detector #(.LINE_LEN(H_TOTAL)) u_feature_detector (
    .pixel_clk   (pixel_clk),
    .rst         (rst),
    .ii          (pp_ii),
    .sync_in     (pp_sync),
    .threshold   (threshold),
    .feature_data(fd_data),
    .sync_out    (fd_sync)
  );

  detector_interface #(
    .W(W), .H(H), .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL), .FIFO_DEPTH(FEAT_DEPTH)
  ) u_detector_interface (
    .pixel_clk    (pixel_clk),
    .rst          (rst),
    .feature_data (fd_data),
    .sync         (fd_sync),
    .threshold    (threshold),
    .address      (det_address),
    .read         (det_read),
    .write        (det_write),
    .writedata    (det_writedata),
    .readdata     (det_readdata),
    .readdatavalid(det_readdatavalid),
    .irq          (det_irq)
  );

  memory_buffer #(.W(W), .FIFO_DEPTH(DMA_DEPTH)) u_memory_buffer (
    .pixel_clk    (pixel_clk),
    .rst          (rst),
    .pixel_data   (vs_data),
    .sync         (vs_sync),
    .frame_base   (frame_base),
    .m_address    (mem_address),
    .m_write      (mem_write),
    .m_writedata  (mem_writedata),
    .m_waitrequest(mem_waitrequest),
    .overflow     (mem_overflow),
    .line_count   (mem_line_count)
  );

endmodule
