// pfc_pkg - configuration and status types of the dual boost PFC controller.
//
// All quantities are sfloat24 in physical units (volts, amperes). The A/D
// channels are numbered as in CH_* below.
package pfc_pkg;
  import sf24_pkg::*;

  localparam int NCH   = 4;
  localparam int AD_W  = 10;
  localparam int CH_VAC = 0;   // AC mains (or rectified boost input) voltage
  localparam int CH_VDC = 1;   // DC output voltage
  localparam int CH_IB1 = 2;   // main PFC current i_b1
  localparam int CH_IB2 = 3;   // filtering PFC current i_b2

  typedef struct packed {
    sf24_t       v_ref;        // V*_DC
    sf24_t       kp;           // PI proportional gain
    sf24_t       ki;           // PI integral gain times the task period
    sf24_t       pi_lim;       // PI output / integral limit (A)
    sf24_t       i_amp;        // fixed current amplitude when use_pi = 0
    sf24_t       k_vac;        // |v_ac| scale factor when use_cordic = 0
    sf24_t       b_m;          // main PFC hysteresis band
    sf24_t       b_f;          // filtering PFC hysteresis band
    sf24_t       i_max;        // overcurrent limit
    sf24_t       v_max;        // overvoltage limit
    sf24_t [NCH-1:0] gain;     // digital conversion gain per channel
    sf24_t [NCH-1:0] offset;   // digital offset per channel
    logic [15:0] phase_inc;    // modulo-sine phase step per task
    logic        use_pi;       // amplitude from the PI regulator
    logic        use_cordic;   // shape from CORDIC |sin|, else k_vac*|v_ac|
    logic        filt_en;      // 0: filtering boost off (single boost)
  } pfc_cfg_t;

  typedef struct packed {
    sf24_t v_ac;
    sf24_t v_dc;
    sf24_t i_b1;
    sf24_t i_b2;
    sf24_t amp;                // current amplitude (PI output or i_amp)
    sf24_t i_ref;              // total PFC current reference i*
    sf24_t e_b;                // i* - i_b1, the filtering reference
    logic  oc;
    logic  ov;
  } pfc_status_t;

endpackage
