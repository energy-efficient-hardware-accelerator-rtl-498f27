// tmx_pe_array: ROWS x COLS array of TMx processing elements.
// Operand buffers are written over one shared bus; `pe_sel` picks the PE
// that takes the write and whose PSUM buffer is read. `start` launches the
// same command (length, PSUM entry, zero-skip mode) on every PE, each with
// its own initial psum. Because an outlier stretches a PE's pair to two or
// four cycles, PEs finish at different times; `done` pulses once the last
// one has finished. The 3 x 5 default is the array as drawn for the design;
// the shared, addressed load bus is this implementation's choice.
module tmx_pe_array #(
  parameter int ROWS       = 3,
  parameter int COLS       = 5,
  parameter int BUF_DEPTH  = 256,
  parameter int DATA_W     = 8,
  parameter int NB         = 4,
  parameter int ACC_W      = 24,
  parameter int PSUM_DEPTH = 16,
  localparam int NPE = ROWS*COLS,
  localparam int SW  = $clog2(NPE),
  localparam int AW  = $clog2(BUF_DEPTH),
  localparam int LW  = $clog2(BUF_DEPTH+1),
  localparam int PAW = $clog2(PSUM_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SW-1:0]           pe_sel,
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
  input  logic                    start,
  input  logic [LW-1:0]           len,
  input  logic [PAW-1:0]          psum_addr,
  input  logic                    psum_init,
  input  logic signed [ACC_W-1:0] psum_in [NPE],
  input  logic                    zero_skip,
  output logic                    busy,
  output logic                    done,
  input  logic [PAW-1:0]          psum_raddr,
  output logic signed [ACC_W-1:0] psum_rdata,
  output logic [31:0]             mult_cycles,
  output logic [31:0]             skip_count
);
  logic [NPE-1:0]          pe_busy, pe_done, finished;
  logic signed [ACC_W-1:0] pe_rdata [NPE];
  logic [31:0]             pe_mult [NPE];
  logic [31:0]             pe_skip [NPE];
  logic                    active;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    tmx_pe #(.BUF_DEPTH(BUF_DEPTH), .DATA_W(DATA_W), .NB(NB), .ACC_W(ACC_W),
             .PSUM_DEPTH(PSUM_DEPTH)) u_pe (
      .clk, .rst_n,
      .ifm_we(ifm_we && pe_sel == SW'(p)), .ifm_waddr, .ifm_wdata, .ifm_zero, .ifm_outlier,
      .wgt_we(wgt_we && pe_sel == SW'(p)), .wgt_waddr, .wgt_wdata, .wgt_zero, .wgt_outlier,
      .start(start && !active), .len, .psum_addr, .psum_init, .psum_in(psum_in[p]), .zero_skip,
      .busy(pe_busy[p]), .done(pe_done[p]),
      .psum_raddr, .psum_rdata(pe_rdata[p]),
      .mult_cycles(pe_mult[p]), .skip_count(pe_skip[p])
    );
  end

  always_comb begin
    mult_cycles = '0;
    skip_count  = '0;
    for (int p = 0; p < NPE; p++) begin
      mult_cycles += pe_mult[p];
      skip_count  += pe_skip[p];
    end
  end

  assign psum_rdata = pe_rdata[pe_sel];
  assign busy       = active | (|pe_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; finished <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !active) begin
        active <= 1'b1; finished <= '0;
      end else if (active) begin
        if ((finished | pe_done) == '1) begin
          active <= 1'b0; done <= 1'b1; finished <= '0;
        end else begin
          finished <= finished | pe_done;
        end
      end
    end
  end
endmodule
