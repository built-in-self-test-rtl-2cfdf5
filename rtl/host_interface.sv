// host_interface: register bank through which a PC controls the sweep and
// collects the results.
//
// A simple synchronous word bus: on a clock with wr_en the register at
// addr takes wr_data; rd_data always shows the register at addr
// (combinational read). Registers (see bist_pkg::reg_addr_e):
//   CTRL        write: bit0 = start a sweep, bit1 = acknowledge the current
//               result (both self-clearing pulses to the controller);
//               read: bit0 busy, bit1 result valid, bit2 sweep done,
//               bit3 phase-detector timeout of the current result
//   FCW_START, FCW_STEP, FCW_STOP, SETTLE   read/write, L bits used
//   RES_FCW, RES_PHASE                      result FCW and delay (cycles)
//   RES_AMP_LO, RES_AMP_HI                  amplitude sum, low 32 bits and
//                                           the rest sign-extended
//   RES_THETA                               phase shift, 2*pi/2^L units
// A result stays readable until it is acknowledged; the controller stalls
// in the meantime, so no result is lost however slowly the host reads.
//
// Reset values: FCW_START = FCW_STEP = 2, FCW_STOP = 2^(L-1) (half the
// clock frequency), SETTLE = 2^(L-2) cycles.
//
// The document only says that an interface lets a PC control the BIST
// circuitry and retrieve its results; this register map and bus are this
// design's own. FCW widths up to 32 bits are supported.
module host_interface
  import bist_pkg::*;
#(
  parameter int L     = 16,
  parameter int ACC_W = 33
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host bus
  input  logic [3:0]             addr,
  input  logic                   wr_en,
  input  logic [31:0]            wr_data,
  output logic [31:0]            rd_data,
  // controller side
  output logic                   start_sweep,
  output logic                   result_ack,
  output logic [L-1:0]           fcw_start,
  output logic [L-1:0]           fcw_step,
  output logic [L-1:0]           fcw_stop,
  output logic [L-1:0]           settle,
  input  logic                   busy,
  input  logic                   sweep_done,
  input  logic                   result_valid,
  input  logic [L-1:0]           result_fcw,
  input  logic [L-1:0]           result_delay,
  input  logic [L-1:0]           result_theta,
  input  logic                   result_timeout,
  input  logic signed [ACC_W-1:0] result_amp
);

  logic signed [63:0] amp64;

  assign amp64 = 64'(result_amp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_sweep <= 1'b0;
      result_ack  <= 1'b0;
      fcw_start   <= L'(2);
      fcw_step    <= L'(2);
      fcw_stop    <= L'(1) << (L - 1);
      settle      <= L'(1) << (L - 2);
    end else begin
      start_sweep <= 1'b0;
      result_ack  <= 1'b0;
      if (wr_en) begin
        case (addr)
          REG_CTRL: begin
            start_sweep <= wr_data[0];
            result_ack  <= wr_data[1];
          end
          REG_FCW_START: fcw_start <= wr_data[L-1:0];
          REG_FCW_STEP:  fcw_step  <= wr_data[L-1:0];
          REG_FCW_STOP:  fcw_stop  <= wr_data[L-1:0];
          REG_SETTLE:    settle    <= wr_data[L-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    case (addr)
      REG_CTRL: begin
        rd_data[STAT_BUSY]    = busy;
        rd_data[STAT_VALID]   = result_valid;
        rd_data[STAT_DONE]    = sweep_done;
        rd_data[STAT_TIMEOUT] = result_timeout;
      end
      REG_FCW_START:  rd_data = 32'(fcw_start);
      REG_FCW_STEP:   rd_data = 32'(fcw_step);
      REG_FCW_STOP:   rd_data = 32'(fcw_stop);
      REG_SETTLE:     rd_data = 32'(settle);
      REG_RES_FCW:    rd_data = 32'(result_fcw);
      REG_RES_PHASE:  rd_data = 32'(result_delay);
      REG_RES_AMP_LO: rd_data = amp64[31:0];
      REG_RES_AMP_HI: rd_data = amp64[63:32];
      REG_RES_THETA:  rd_data = 32'(result_theta);
      default:        rd_data = '0;
    endcase
  end

endmodule
