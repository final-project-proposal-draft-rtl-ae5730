// obtain_image: captures one camera frame into the frame memory.
// After a snapshot request the stage waits for the camera's start-of-frame
// pixel, then writes the camera lines alternately into two input_buffer line
// buffers (ping-pong). When a line is complete, the buffer that holds it is
// copied through the output multiplexer into the frame memory, one pixel per
// clock, while the other buffer fills with the next line. The camera may
// deliver at most one pixel per clock, so a copy of W pixels always ends
// before the next line is complete.
// Interface: camera stream (cam_valid, cam_sof, cam_pix); frame-memory write
// port (mem_we, mem_waddr, mem_wdata), raster order, address = row*W + col;
// busy while a snapshot is in progress, done pulses for one clock after the
// last pixel of the frame is written.
// The camera is taken to deliver 8-bit grey levels: the grey conversion the
// design description leaves open is not performed here.
module obtain_image #(
  parameter int unsigned W = ipu_pkg::IMG_W,
  parameter int unsigned H = ipu_pkg::IMG_H,
  localparam int unsigned AW = $clog2(W*H),
  localparam int unsigned CW = $clog2(W),
  localparam int unsigned RW = $clog2(H)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            snap,
  input  logic            cam_valid,
  input  logic            cam_sof,
  input  ipu_pkg::pixel_t cam_pix,
  output logic            mem_we,
  output logic [AW-1:0]   mem_waddr,
  output ipu_pkg::pixel_t mem_wdata,
  output logic            busy,
  output logic            done
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_SOF, S_CAPTURE, S_FLUSH} state_e;
  state_e state;

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          fill_sel;          // buffer being filled by the camera
  logic          take;              // a camera pixel is stored this clock

  // copy (drain) side
  logic          drain_act, drain_sel;
  logic [CW-1:0] drain_col;
  logic [RW-1:0] drain_row;
  logic          rd_v;              // read issued last clock
  logic          rd_sel;
  logic [AW-1:0] rd_addr;

  ipu_pkg::pixel_t buf_rdata [2];

  assign take = cam_valid && ((state == S_CAPTURE) || (state == S_WAIT_SOF && cam_sof));

  for (genvar b = 0; b < 2; b++) begin : g_buf
    input_buffer #(.LINE(W)) u_buf (
      .clk   (clk),
      .we    (take && (fill_sel == b[0])),
      .waddr ((state == S_WAIT_SOF) ? '0 : col),
      .wdata (cam_pix),
      .raddr (drain_col),
      .rdata (buf_rdata[b])
    );
  end

  // W >= 2 is assumed: the start-of-frame pixel is never the end of a line.
  wire line_end = take && (state == S_CAPTURE) && (col == CW'(W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      col         <= '0;
      row         <= '0;
      fill_sel    <= 1'b0;
      drain_act   <= 1'b0;
      drain_sel   <= 1'b0;
      drain_col   <= '0;
      drain_row   <= '0;
      rd_v        <= 1'b0;
      rd_sel      <= 1'b0;
      rd_addr     <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      // copy side: read a buffer, write the frame memory one clock later
      rd_v <= 1'b0;
      if (drain_act) begin
        rd_v    <= 1'b1;
        rd_sel  <= drain_sel;
        rd_addr <= AW'(drain_row) * AW'(W) + AW'(drain_col);
        if (drain_col == CW'(W-1)) drain_act <= 1'b0;
        drain_col <= drain_col + 1'b1;
      end
      if (rd_v && rd_addr == AW'(W*H-1)) begin
        done  <= 1'b1;
        state <= S_IDLE;
      end
      // camera side
      unique case (state)
        S_IDLE: if (snap) state <= S_WAIT_SOF;
        S_WAIT_SOF: if (take) begin
          state <= S_CAPTURE;
          col   <= CW'(1);
          row   <= '0;
        end
        S_CAPTURE: if (take) col <= line_end ? '0 : col + 1'b1;
        S_FLUSH: ;
      endcase
      if (line_end) begin          // hand the full buffer to the copy side
        fill_sel  <= ~fill_sel;
        drain_act <= 1'b1;
        drain_sel <= fill_sel;
        drain_col <= '0;
        drain_row <= row;
        if (row == RW'(H-1)) state <= S_FLUSH;
        else row <= row + 1'b1;
      end
    end
  end

  assign mem_we    = rd_v;
  assign mem_waddr = rd_addr;
  assign mem_wdata = buf_rdata[rd_sel];     // output multiplexer of the two buffers
  assign busy      = (state != S_IDLE);

  // A line must be copied out before the next one is complete.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 line_end |-> (!drain_act || drain_col == CW'(W-1)))
    else $error("obtain_image: line copy overrun");
endmodule
