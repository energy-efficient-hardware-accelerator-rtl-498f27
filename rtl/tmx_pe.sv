// tmx_pe: time-multiplexing processing element.
// Holds a BUF_DEPTH x 8-bit IFM buffer and a BUF_DEPTH x 8-bit weight buffer,
// each entry stored with its zero and outlier indicator bits, an indexing
// module, one narrow TMx multiply-accumulator, a psum input mux and a PSUM
// buffer. A `start` computes
//     PSUM[psum_addr] = init + sum_{i<len} IFM[i] * WGT[i]
// where init is `psum_in` (psum_init = 1) or the current PSUM entry.
// Timing: the start cycle loads the accumulator; then each operand pair
// takes 1 cycle (no outlier), 2 (one outlier) or 4 (both outliers). In
// zero-skip mode (TMxZ) a pair with a zero operand takes 1 cycle with the
// multiplier idle. `done` pulses one cycle after the final step, when the
// PSUM entry has been written. Buffer sizes follow the design; the PSUM
// depth, the accumulator width and the 1-cycle zero skip are choices of
// this implementation.
module tmx_pe
  import tmx_pkg::*;
#(
  parameter int BUF_DEPTH  = 256,
  parameter int DATA_W     = 8,
  parameter int NB         = 4,
  parameter int ACC_W      = 24,
  parameter int PSUM_DEPTH = 16,
  localparam int AW  = $clog2(BUF_DEPTH),
  localparam int LW  = $clog2(BUF_DEPTH+1),
  localparam int PAW = $clog2(PSUM_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // operand buffer writes (value plus its indicators)
  input  logic                    ifm_we,
  input  logic [AW-1:0]           ifm_waddr,
  input  logic [DATA_W-1:0]       ifm_wdata,
  input  logic                    ifm_zero,
  input  logic                    ifm_outlier,
  input  logic                    wgt_we,
  input  logic [AW-1:0]           wgt_waddr,
  input  logic [DATA_W-1:0]       wgt_wdata,
  input  logic                    wgt_zero,
  input  logic                    wgt_outlier,
  // command
  input  logic                    start,
  input  logic [LW-1:0]           len,
  input  logic [PAW-1:0]          psum_addr,
  input  logic                    psum_init,
  input  logic signed [ACC_W-1:0] psum_in,
  input  logic                    zero_skip,
  output logic                    busy,
  output logic                    done,
  // PSUM buffer read
  input  logic [PAW-1:0]          psum_raddr,
  output logic signed [ACC_W-1:0] psum_rdata,
  // activity counters: cycles with the multiplier used, pairs skipped
  output logic [31:0]             mult_cycles,
  output logic [31:0]             skip_count
);
  localparam int SH_W = $clog2(2*NB+1);
  typedef struct packed {
    logic              outlier;
    logic              zero;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t                  ifm_buf [BUF_DEPTH];
  entry_t                  wgt_buf [BUF_DEPTH];
  logic signed [ACC_W-1:0] psum_buf [PSUM_DEPTH];

  logic            run;
  logic [LW-1:0]   idx, len_q;
  logic [PAW-1:0]  paddr_q;
  logic            zskip_q;

  entry_t          ci, cw;
  logic            skip;
  part_e           ip, wp;
  logic [SH_W-1:0] sh;
  logic            last_step, last_pair;
  logic signed [ACC_W-1:0] acc, acc_next;

  always_ff @(posedge clk) begin
    if (ifm_we) ifm_buf[ifm_waddr] <= '{outlier: ifm_outlier, zero: ifm_zero, data: ifm_wdata};
    if (wgt_we) wgt_buf[wgt_waddr] <= '{outlier: wgt_outlier, zero: wgt_zero, data: wgt_wdata};
  end

  always_comb begin
    ci        = ifm_buf[idx[AW-1:0]];
    cw        = wgt_buf[idx[AW-1:0]];
    skip      = zskip_q & (ci.zero | cw.zero);
    last_pair = (idx == len_q - LW'(1));
  end

  tmx_indexer #(.NB(NB)) u_index (
    .clk, .rst_n,
    .advance (run),
    .ifm_out (ci.outlier & ~skip),
    .wgt_out (cw.outlier & ~skip),
    .ifm_part(ip), .wgt_part(wp), .shift(sh), .last(last_step)
  );

  tmx_mac #(.DATA_W(DATA_W), .NB(NB), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .ifm(ci.data), .wgt(cw.data), .ifm_part(ip), .wgt_part(wp), .shift(sh),
    .en    (run & ~skip),
    .load  (start & ~run),
    .acc_in(psum_init ? psum_in : psum_buf[psum_addr]),
    .acc, .acc_next
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; idx <= '0; len_q <= '0; paddr_q <= '0; zskip_q <= 1'b0; done <= 1'b0;
      mult_cycles <= '0; skip_count <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; idx <= '0; len_q <= len; paddr_q <= psum_addr; zskip_q <= zero_skip;
      end else if (run) begin
        if (skip) skip_count  <= skip_count + 1;
        else      mult_cycles <= mult_cycles + 1;
        if (last_step) begin
          idx <= idx + LW'(1);
          if (last_pair) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (run && last_step && last_pair) psum_buf[paddr_q] <= acc_next;

  assign busy       = run;
  assign psum_rdata = psum_buf[psum_raddr];

  // a command needs at least one operand pair
  assert property (@(posedge clk) disable iff (!rst_n) (start && !run) |-> (len != '0));
endmodule
