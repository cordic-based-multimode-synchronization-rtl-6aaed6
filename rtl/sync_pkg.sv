// sync_pkg: types and constants shared by the multimode OFDM synchronizer.
//
// The synchronizer serves two OFDM standards with one datapath: IEEE 802.11a/g
// (64-point FFT) and IEEE 802.16d (256-point FFT). The mode selects the
// correlation delays of frame detection and symbol boundary detection and the
// divider that turns the estimated CFO angle into a per-sample phase step.
//
// Angles are binary angles (BAM): ZW bits cover one full turn, so pi is
// 2**(ZW-1) and wrap-around is free. The CORDIC arctangent constants below are
// round(atan(2**-i) / (2*pi) * 2**16) for the shift indices the design uses
// (i = -3 and i = 0..9); the angle width is fixed at 16 bits to match them.
// Sample width (12 bits per rail) follows the 12-bit register files of the
// reference implementation; everything else here is this design's choice.
package sync_pkg;

  typedef enum logic {
    MODE_WLAN = 1'b0,   // IEEE 802.11a/g
    MODE_WMAN = 1'b1    // IEEE 802.16d
  } mode_e;

  localparam int DW = 12;      // sample width per rail
  localparam int ZW = 16;      // angle width (BAM, full turn = 2**16)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Sign of a complex sample, 1 = negative; the quantised "QPSK" form used by
  // the matched filters.
  typedef struct packed {
    logic re;
    logic im;
  } csign_t;

  // atan(2**-i) in BAM units for i = -3 .. 9.
  function automatic logic signed [ZW-1:0] atan_bam(input int i);
    case (i)
      -3:      return 16'sd15087;
      0:       return 16'sd8192;
      1:       return 16'sd4836;
      2:       return 16'sd2555;
      3:       return 16'sd1297;
      4:       return 16'sd651;
      5:       return 16'sd326;
      6:       return 16'sd163;
      7:       return 16'sd81;
      8:       return 16'sd41;
      9:       return 16'sd20;
      default: return 16'sd0;
    endcase
  endfunction

  // Shift index of CORDIC stage k (0..9) in estimation: 0,1,...,9.
  function automatic int cordic_shift_est(input int k);
    return k;
  endfunction

  // Shift index of CORDIC stage k in compensation: -3,0,1,...,8.
  function automatic int cordic_shift_comp(input int k);
    return (k == 0) ? -3 : k - 1;
  endfunction

endpackage
