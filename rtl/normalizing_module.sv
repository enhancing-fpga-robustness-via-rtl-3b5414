// normalizing_module: converts a raw thermistor resistance into a discrete
// temperature value, the IP core that the sensor station wraps and monitors.
//
// A raw reading (resistance in ohms, unsigned, in the FSL data word) is
// mapped to a whole temperature in degrees Celsius by piecewise-linear
// interpolation of a thermistor curve sampled every 10 degC from -30 to
// 80 degC. The samples are the resistances of a 10 kohm NTC thermistor with
// B = 3950 K,
//     R(T) = 10000 * exp(3950 * (1/(T + 273.15) - 1/298.15)),
// rounded to whole ohms, and each segment's slope is stored as
//     K_i = round(10 * 65536 / (R_i - R_(i+1)))
// so that T = T_i + floor((R_i - R) * K_i / 65536) inside segment i.
// Readings beyond the curve give -30 (open sensor) or 80 (shorted sensor).
// The result is sign-extended to the 32-bit output word. The framework only
// states that raw resistances are normalised to temperatures using the
// thermistors' characteristic; the thermistor type and the interpolation
// are this design's own choice.
//
// Interface: FSL slave in (s_*), FSL master out (m_*). Timing: a fixed
// processing time of LATENCY cycles from reading a word to offering the
// result; the pipeline holds while the output link is full. One word per
// cycle. Reset is synchronous, active high. The control bit passes through.
module normalizing_module
  import mon_pkg::*;
#(
  parameter int unsigned LATENCY = 2
) (
  input  logic      clk,
  input  logic      rst,
  // raw resistance in
  input  logic      s_exists,
  input  fsl_word_t s_data,
  output logic      s_read,
  // temperature out
  output logic      m_write,
  output fsl_word_t m_data,
  input  logic      m_full
);

  localparam int unsigned L = (LATENCY < 1) ? 1 : LATENCY;

  logic              advance;
  fsl_word_t         result;
  fsl_word_t         pipe  [L];
  logic [L-1:0]      valid;

  // Thermistor curve: resistance at T_LO + 10*i degC, and segment slopes.
  localparam int NPT  = 12;
  localparam int T_LO = -30;
  localparam int unsigned R_PT [NPT] = '{200204, 105385, 58246, 33621, 20175, 12535,
                                         8037, 5301, 3588, 2486, 1760, 1270};
  localparam int unsigned K_PT [NPT-1] = '{7, 14, 27, 49, 86, 146, 240, 383, 595, 903, 1337};

  // Piecewise-linear conversion of one reading.
  always_comb begin
    logic [31:0] r;
    int          seg;
    logic [47:0] prod;
    r    = s_data.data;
    seg  = 0;
    for (int i = 1; i < NPT - 1; i++)
      if (r < R_PT[i]) seg = i;
    prod = 48'(R_PT[seg] - r) * 48'(K_PT[seg]);
    result.ctrl = s_data.ctrl;
    if (r >= R_PT[0])            result.data = FSL_DW'(T_LO);
    else if (r <= R_PT[NPT-1])   result.data = FSL_DW'(T_LO + 10 * (NPT - 1));
    else                         result.data = FSL_DW'(T_LO + 10 * seg + int'(prod >> 16));
  end

  assign advance = !(valid[L-1] && m_full);
  assign s_read  = s_exists && advance;
  assign m_write = valid[L-1] && !m_full;
  assign m_data  = pipe[L-1];

  always_ff @(posedge clk) begin
    if (advance) begin
      pipe[0] <= result;
      for (int i = 1; i < L; i++) pipe[i] <= pipe[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) valid <= '0;
    else if (advance) valid <= L'({valid, s_read}) ;
  end

endmodule
