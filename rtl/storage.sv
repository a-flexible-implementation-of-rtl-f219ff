// storage: capture of the front-end samples into memory.
//
// After start, the next `count` samples offered on s_valid are stored as
// consecutive words from `base`. A sample is a 4-bit signed in-phase and
// quadrature pair; it is stored as a 16+16 bit complex word scaled by
// 2^SHIFT, the input format of the FFT. A small FIFO absorbs the cycles in
// which the bus does not grant; a sample that finds it full is lost and sets
// overflow, which stays set until the next start (the lost
// samples are missing from the end of the buffer). done pulses when the last
// word has been written. The document gives the 4-bit sample format and the
// Storage module's place between the front end and the bus; the FIFO, the
// scaling and the overflow flag are this design's.
// Seventeen output bits are constant by design: the module only writes
// (bus_req.we is always 1), and the low SHIFT bits of each half of the
// written word are zero because of the 2^SHIFT scaling.
module storage #(
  parameter int unsigned SHIFT = 8,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [gnss_pkg::MEM_AW-1:0]   base,
  input  logic [gnss_pkg::MEM_AW:0]     count,
  input  logic                          s_valid,
  input  logic signed [3:0]             s_i,
  input  logic signed [3:0]             s_q,
  output logic                          busy,
  output logic                          done,
  output logic                          overflow,
  output gnss_pkg::bus_req_t            bus_req,
  input  gnss_pkg::bus_rsp_t            bus_rsp
);
  import gnss_pkg::*;

  logic [MEM_AW:0]   n_in, n_out, total;
  logic [MEM_AW-1:0] base_q;
  logic              capturing;
  logic              f_push, f_empty, f_full;
  logic [7:0]        f_dout;
  logic [$clog2(FIFO_DEPTH):0] f_count;
  cplx_t             w;

  assign capturing = busy && (n_in < total);
  assign f_push    = capturing && s_valid && !f_full;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (f_push),
    .din  ({s_i, s_q}),
    .pop  (bus_rsp.gnt),
    .dout (f_dout),
    .empty(f_empty),
    .full (f_full),
    .count(f_count)
  );

  always_comb begin
    w.re = 16'($signed(f_dout[7:4])) <<< SHIFT;
    w.im = 16'($signed(f_dout[3:0])) <<< SHIFT;
    bus_req       = '0;
    bus_req.req   = busy && !f_empty;
    bus_req.we    = 1'b1;
    bus_req.addr  = BUS_AW'(base_q) + BUS_AW'(n_out);
    bus_req.wdata = w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      overflow <= 1'b0;
      n_in     <= '0;
      n_out    <= '0;
      total    <= '0;
      base_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        overflow <= 1'b0;
        n_in     <= '0;
        n_out    <= '0;
        total    <= count;
        base_q   <= base;
      end else if (busy) begin
        if (capturing && s_valid) begin
          if (f_full) overflow <= 1'b1;
          n_in <= n_in + 1'b1;
        end
        if (bus_rsp.gnt) n_out <= n_out + 1'b1;
        if (!capturing && f_empty) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
