// hist_eq_unit: the histogram equaliser. Three passes, run after start:
//   1. histogram build: the stored frame is read in raster order, LANES
//      neighbouring pixels per clock, into hist_builder (cumulative counts
//      by switching decoder, LANES decoder copies);
//   2. histogram equalise: hist_equalizer fills the 256-entry LUT (256 clocks);
//   3. image build: the frame is read again, each pixel goes through the LUT
//      in image_builder and is written to the buffer memory at its address.
// A frame of N pixels takes about N/LANES + N + 260 clocks. The LUT has a second
// read port for the display, which can show the equalised image by looking up
// the grey level of each stored pixel.
// Interface: frame-memory read port (mem_re, mem_raddr; one clock later
// mem_rdata, the pixel, and mem_rdata_wide, the LANES-pixel group starting
// at a multiple of LANES; N must be a multiple of LANES); buffer-memory
// write port (buf_we, buf_waddr, buf_wdata); display lookup disp_pix ->
// disp_eq (combinational); busy; done pulses at the end.
// The stage order and the parallel counters follow the proposal; running the
// stages as sequential passes and the choice of four lanes are this design's.
module hist_eq_unit #(
  parameter int unsigned W = ipu_pkg::IMG_W,
  parameter int unsigned H = ipu_pkg::IMG_H,
  parameter int unsigned LANES = 4,
  localparam int unsigned N  = W * H,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            mem_re,
  output logic [AW-1:0]   mem_raddr,
  input  ipu_pkg::pixel_t mem_rdata,
  input  ipu_pkg::pixel_t mem_rdata_wide [LANES],
  output logic            buf_we,
  output logic [AW-1:0]   buf_waddr,
  output ipu_pkg::pixel_t buf_wdata,
  input  ipu_pkg::pixel_t disp_pix,
  output ipu_pkg::pixel_t disp_eq,
  output logic            busy,
  output logic            done
);
  typedef enum logic [2:0] {P_IDLE, P_HIST, P_HIST_END, P_LUT, P_BUILD, P_BUILD_END} phase_e;
  phase_e phase;

  logic [AW-1:0] addr;          // read address of the current pass
  logic          rd_v;          // a read was issued last clock
  logic [AW-1:0] rd_addr;
  logic          lut_start, lut_busy, lut_done;
  logic [7:0]    cum_bin;
  logic [CNT_W-1:0] cum_val;
  ipu_pkg::pixel_t  lut_addr_a, lut_data_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      addr      <= '0;
      rd_v      <= 1'b0;
      rd_addr   <= '0;
      lut_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      done      <= 1'b0;
      lut_start <= 1'b0;
      rd_v      <= mem_re;
      rd_addr   <= addr;
      unique case (phase)
        P_IDLE: if (start) begin
          phase <= P_HIST;
          addr  <= '0;
        end
        P_HIST: begin
          addr <= addr + AW'(LANES);
          if (addr == AW'(N-LANES)) phase <= P_HIST_END;
        end
        P_HIST_END: if (!rd_v) begin   // last pixel counted
          phase     <= P_LUT;
          lut_start <= 1'b1;
        end
        P_LUT: if (lut_done) begin
          phase <= P_BUILD;
          addr  <= '0;
        end
        P_BUILD: begin
          addr <= addr + 1'b1;
          if (addr == AW'(N-1)) phase <= P_BUILD_END;
        end
        P_BUILD_END: if (!rd_v && !buf_we) begin
          phase <= P_IDLE;
          done  <= 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign mem_re    = (phase == P_HIST) || (phase == P_BUILD);
  assign mem_raddr = addr;
  assign busy      = (phase != P_IDLE);

  hist_builder #(.NPIX(N), .LANES(LANES)) u_builder (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (phase == P_IDLE && start),
    .in_valid (rd_v && (phase == P_HIST || phase == P_HIST_END)),
    .in_pix   (mem_rdata_wide),
    .rd_bin   (cum_bin),
    .rd_cum   (cum_val)
  );

  hist_equalizer #(.NPIX(N)) u_equalizer (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (lut_start),
    .cum_bin    (cum_bin),
    .cum_val    (cum_val),
    .busy       (lut_busy),
    .done       (lut_done),
    .lut_addr_a (lut_addr_a),
    .lut_data_a (lut_data_a),
    .lut_addr_b (disp_pix),
    .lut_data_b (disp_eq)
  );

  image_builder #(.AW(AW)) u_image (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rd_v && (phase == P_BUILD || phase == P_BUILD_END)),
    .in_addr   (rd_addr),
    .in_pix    (mem_rdata),
    .lut_addr  (lut_addr_a),
    .lut_data  (lut_data_a),
    .out_valid (buf_we),
    .out_addr  (buf_waddr),
    .out_pix   (buf_wdata)
  );

  a_lut_idle: assert property (@(posedge clk) disable iff (!rst_n) (phase == P_BUILD) |-> !lut_busy)
    else $error("hist_eq_unit: image build while LUT is being written");
endmodule
