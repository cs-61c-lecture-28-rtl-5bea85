00000000
11010100
22020200
33030300
44040400
55050500
66060600
77070700
88080800
99090900
aa0a0a00
bb0b0b00
cc0c0c00
dd0d0d00
ee0e0e00
ff0f0f00
